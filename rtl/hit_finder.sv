// hit_finder: moves hits from the column FIFO array into the output FIFO.
//
// This is the fast hit finder: it removes one hit per clock (80 MHz) no
// matter how the hits are spread over rows and columns; moving on to another
// row, or skipping empty rows, costs no clock. Each cycle it looks at the head
// entry of every column FIFO, and among the heads whose row is at or after
// the row it is working on (hf_row) it takes the one with the lowest row, the
// lowest column on a tie. That hit is written into the output FIFO as a
// 24-bit {row, column, ADC} word, so hits leave in row order and, within a
// row, in column order. The selection is a combinational tournament tree of
// log2(N_COLS) levels of compare-and-select (6 levels for 64 columns).
//
// Frame boundaries (this design's own mechanism): when no head belongs to
// the current frame any more and the input stage has started a later frame
// (wr_frame differs from hf_frame), the hit finder writes a frame marker
// (hit word with ADC = 0 carrying the new frame ID) instead of a hit, and
// restarts at row 0. Every frame therefore gets exactly one marker, even a
// frame without hits. After reset hf_frame is all ones and hf_row is beyond
// the last row, so the first marker announces frame 0.
//
// When the output FIFO is full (out_full) nothing moves: the hit finder
// stalls and the column FIFOs absorb the backlog. Outputs out_valid/out_data
// are combinational and qualify the write into the output FIFO in the same
// cycle as the rd_en one-hot pop of the column FIFO.
module hit_finder
  import dhp_pkg::*;
#(
  parameter int unsigned N_COLS = 64,
  parameter int unsigned N_ROWS = 768
) (
  input  logic                clk,
  input  logic                rst_n,
  input  col_entry_t          head     [N_COLS],
  input  logic [N_COLS-1:0]   nonempty,
  input  logic [FRAME_W-1:0]  wr_frame,
  output logic [N_COLS-1:0]   rd_en,
  input  logic                out_full,
  output logic                out_valid,
  output hit_t                out_data,
  output logic                marker_now,
  output logic [FRAME_W-1:0]  hf_frame,
  output logic [ROW_W:0]      hf_row
);
  // One candidate in the selection tree.
  typedef struct packed {
    logic             valid;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    logic [ADC_W-1:0] adc;
  } cand_t;

  // Of two candidates, the left one covers lower columns, so it wins ties.
  function automatic cand_t pick(input cand_t l, input cand_t r);
    if (l.valid && (!r.valid || l.row <= r.row)) return l;
    return r;
  endfunction

  localparam int unsigned LEVELS = (N_COLS > 1) ? $clog2(N_COLS) : 1;
  localparam int unsigned N_LEAF = 1 << LEVELS;

  // Tournament tree over the column heads: level 0 holds the leaves, the
  // last level the winner, i.e. the lowest row at or after hf_row and, on a
  // tie, the lowest column.
  for (genvar lv = 0; lv <= LEVELS; lv++) begin : g_lvl
    cand_t n [N_LEAF >> lv];
    if (lv == 0) begin : g_leaf
      for (genvar i = 0; i < N_LEAF; i++) begin : g_i
        if (i < N_COLS) begin : g_col
          assign n[i] = '{valid: nonempty[i] && ({1'b0, head[i].row} >= hf_row),
                          row: head[i].row, col: COL_W'(i), adc: head[i].adc};
        end else begin : g_pad
          assign n[i] = '0;
        end
      end
    end else begin : g_inner
      for (genvar i = 0; i < (N_LEAF >> lv); i++) begin : g_i
        assign n[i] = pick(g_lvl[lv-1].n[2*i], g_lvl[lv-1].n[2*i+1]);
      end
    end
  end

  cand_t               best;
  logic                found;
  assign best  = g_lvl[LEVELS].n[0];
  assign found = best.valid;

  logic take_hit, take_marker;
  assign take_hit    = !out_full && found;
  assign take_marker = !out_full && !found && (wr_frame != hf_frame);

  always_comb begin
    rd_en = '0;
    if (take_hit) rd_en[best.col] = 1'b1;
  end

  assign out_valid  = take_hit || take_marker;
  assign out_data   = take_hit ? hit_t'{row: best.row, col: best.col, adc: best.adc}
                               : frame_marker(hf_frame + 1'b1);
  assign marker_now = take_marker;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hf_frame <= '1;
      hf_row   <= (ROW_W+1)'(N_ROWS);
    end else if (take_hit) begin
      hf_row <= {1'b0, best.row};
    end else if (take_marker) begin
      hf_frame <= hf_frame + 1'b1;
      hf_row   <= '0;
    end
  end

endmodule
