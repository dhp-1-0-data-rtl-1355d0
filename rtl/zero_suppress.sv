// zero_suppress: input stage of the DHP data path.
//
// Every in_valid strobe delivers one pixel row: N_COLS 8-bit ADC values, one
// per column (64 x 8 bit at 40 MHz; the data path runs at 80 MHz, so in_valid
// is high on every second clock). The stage numbers the rows 0..N_ROWS-1 and
// the frames, keeps only non-zero values and presents them, one cycle later,
// as write requests {row, ADC} to the column FIFO of their column.
//
// Order guard (this design's own): the hit finder recognises the frame of an
// entry from its row number alone, which is unambiguous only while the hit
// finder is less than one frame behind the input. The hit finder reports the
// frame and row it is working on (hf_frame, hf_row); a row that would arrive a
// full frame or more ahead of it is dropped and its hits are counted in
// guard_lost. In normal operation the hit finder is far closer than that.
//
// Outputs: wr_en/wr_data per column (registered), wr_frame = frame of the
// rows now being written (read by the hit finder to detect frame ends),
// guard_lost = hits dropped by the order guard.
module zero_suppress
  import dhp_pkg::*;
#(
  parameter int unsigned N_COLS = 64,
  parameter int unsigned N_ROWS = 768
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [ADC_W-1:0]    in_adc  [N_COLS],
  input  logic [FRAME_W-1:0]  hf_frame,
  input  logic [ROW_W:0]      hf_row,
  output logic [N_COLS-1:0]   wr_en,
  output col_entry_t          wr_data [N_COLS],
  output logic [FRAME_W-1:0]  wr_frame,
  output logic [31:0]         guard_lost
);
  logic [ROW_W-1:0]   row_cnt;
  logic [FRAME_W-1:0] frame_cnt;
  logic [N_COLS-1:0]  nonzero;
  logic [FRAME_W-1:0] lag_frames;
  logic               blocked;
  logic [$clog2(N_COLS+1)-1:0] n_hits;

  always_comb begin
    n_hits = '0;
    for (int c = 0; c < N_COLS; c++) begin
      nonzero[c] = (in_adc[c] != '0);
      n_hits += nonzero[c];
    end
  end

  // The row to be written may not be a whole frame or more ahead of the
  // hit finder's position.
  assign lag_frames = frame_cnt - hf_frame;
  assign blocked = (lag_frames > 16'd1) ||
                   ((lag_frames == 16'd1) && ({1'b0, row_cnt} >= hf_row));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_cnt    <= '0;
      frame_cnt  <= '0;
      wr_en      <= '0;
      wr_frame   <= '0;
      guard_lost <= '0;
    end else begin
      wr_en     <= '0;
      if (in_valid) begin
        wr_en     <= blocked ? '0 : nonzero;
        wr_frame  <= frame_cnt;
        if (blocked) guard_lost <= guard_lost + 32'(n_hits);
        if (row_cnt == ROW_W'(N_ROWS - 1)) begin
          row_cnt   <= '0;
          frame_cnt <= frame_cnt + 1'b1;
        end else begin
          row_cnt <= row_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int c = 0; c < N_COLS; c++) begin
        wr_data[c].row <= row_cnt;
        wr_data[c].adc <= in_adc[c];
      end
    end
  end

endmodule
