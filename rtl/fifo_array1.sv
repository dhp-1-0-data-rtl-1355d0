// fifo_array1: the column FIFO array in front of the hit finder ("Fifo array 1").
//
// N_COLS independent FIFOs, one per pixel column, each DEPTH entries of
// 18-bit {row, ADC}. The default depth of 16 is the size found sufficient
// for the one-hit-per-clock hit finder (64 x 16 x 18 bit = 18 kbit). Column c
// is written when wr_en[c] is high; a write into a full FIFO is lost, and
// the number of lost hits is accumulated in lost_cnt (lost_now gives the
// number lost in the current cycle). The hit finder sees every FIFO's head
// entry and empty flag and removes at most one entry per cycle with the
// one-hot rd_en. max_fill records the highest fill level reached by any
// column since reset, for occupancy studies.
module fifo_array1
  import dhp_pkg::*;
#(
  parameter int unsigned N_COLS = 64,
  parameter int unsigned DEPTH  = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_COLS-1:0]            wr_en,
  input  col_entry_t                   wr_data [N_COLS],
  input  logic [N_COLS-1:0]            rd_en,
  output col_entry_t                   head    [N_COLS],
  output logic [N_COLS-1:0]            nonempty,
  output logic [$clog2(N_COLS+1)-1:0]  lost_now,
  output logic [31:0]                  lost_cnt,
  output logic [$clog2(DEPTH+1)-1:0]   max_fill
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [N_COLS-1:0] full, empty;
  logic [CW-1:0]     fill [N_COLS];
  logic [CW-1:0]     fill_max_now;

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    sync_fifo #(.WIDTH($bits(col_entry_t)), .DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (wr_en[c]),
      .wr_data (wr_data[c]),
      .full    (full[c]),
      .rd_en   (rd_en[c]),
      .rd_data (head[c]),
      .empty   (empty[c]),
      .count   (fill[c])
    );
  end

  assign nonempty = ~empty;

  always_comb begin
    lost_now     = '0;
    fill_max_now = '0;
    for (int c = 0; c < N_COLS; c++) begin
      lost_now += (wr_en[c] && full[c]);
      if (fill[c] > fill_max_now) fill_max_now = fill[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_cnt <= '0;
      max_fill <= '0;
    end else begin
      lost_cnt <= lost_cnt + 32'(lost_now);
      if (fill_max_now > max_fill) max_fill <= fill_max_now;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd_en))
    else $error("fifo_array1: more than one column read in a cycle");

endmodule
