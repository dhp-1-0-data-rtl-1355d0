// dhp_top: hit data path of the DHP readout chip.
//
// Pixel rows enter at in_valid/in_adc (64 x 8 bit, one row every second
// clock of the 80 MHz core clock, i.e. 40 MHz). The chain is
//   zero_suppress -> fifo_array1 (64 column FIFOs, depth 16)
//   -> hit_finder (one hit per clock) -> output FIFO (256 x 24 bit)
//   -> data_formatter (16-bit frame header / row header / data words)
// and the 16-bit words leave through out_valid/out_word/out_ready toward the
// serial link, which is not part of this module. The common-mode value for
// each row header is looked up outside through cm_row/cm_value.
//
// Data can be lost at two places, both counted: a write into a full column
// FIFO (lost_fifo1) and, should the hit finder fall a whole frame behind the
// input, a row refused by the input stage (lost_guard). The hit finder stalls
// while the output FIFO is full, so no hit is lost behind it.
// max_fill1 and fifo2_count expose the FIFO fill levels; out_is_row_header
// and out_is_frame_header tell the kind of the word on out_word.
module dhp_top
  import dhp_pkg::*;
#(
  parameter int unsigned N_COLS      = 64,
  parameter int unsigned N_ROWS      = 768,
  parameter int unsigned FIFO1_DEPTH = 16,
  parameter int unsigned FIFO2_DEPTH = 256
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [ADC_W-1:0]                   in_adc [N_COLS],
  input  logic [7:0]                         chip_id,
  output logic [8:0]                         cm_row,
  input  logic [CM_W-1:0]                    cm_value,
  output logic                               out_valid,
  output logic [15:0]                        out_word,
  input  logic                               out_ready,
  output logic                               out_is_row_header,
  output logic                               out_is_frame_header,
  output logic [31:0]                        lost_fifo1,
  output logic [31:0]                        lost_guard,
  output logic [$clog2(FIFO1_DEPTH+1)-1:0]   max_fill1,
  output logic [$clog2(FIFO2_DEPTH+1)-1:0]   fifo2_count,
  output logic                               hf_stall,
  output logic                               frame_marker_now
);
  logic [N_COLS-1:0]   wr_en, rd_en, nonempty;
  col_entry_t          wr_data [N_COLS];
  col_entry_t          head    [N_COLS];
  logic [FRAME_W-1:0]  wr_frame, hf_frame;
  logic [ROW_W:0]      hf_row;

  logic  f2_wr, f2_full, f2_rd, f2_empty;
  hit_t  f2_in, f2_out;

  zero_suppress #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_zs (
    .clk, .rst_n, .in_valid, .in_adc,
    .hf_frame, .hf_row,
    .wr_en, .wr_data, .wr_frame,
    .guard_lost (lost_guard)
  );

  fifo_array1 #(.N_COLS(N_COLS), .DEPTH(FIFO1_DEPTH)) u_fifo1 (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .head, .nonempty,
    .lost_now (), .lost_cnt (lost_fifo1), .max_fill (max_fill1)
  );

  hit_finder #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_hf (
    .clk, .rst_n, .head, .nonempty, .wr_frame, .rd_en,
    .out_full (f2_full), .out_valid (f2_wr), .out_data (f2_in),
    .marker_now (frame_marker_now), .hf_frame, .hf_row
  );

  sync_fifo #(.WIDTH($bits(hit_t)), .DEPTH(FIFO2_DEPTH)) u_fifo2 (
    .clk, .rst_n,
    .wr_en (f2_wr), .wr_data (f2_in), .full (f2_full),
    .rd_en (f2_rd), .rd_data (f2_out), .empty (f2_empty),
    .count (fifo2_count)
  );

  data_formatter u_fmt (
    .clk, .rst_n,
    .in_valid (!f2_empty), .in_data (f2_out), .in_rd (f2_rd),
    .chip_id, .cm_row, .cm_value,
    .out_valid, .out_word, .out_ready,
    .word_is_row_header (out_is_row_header),
    .word_is_frame_header (out_is_frame_header)
  );

  // The hit finder is held up by a full output FIFO while work is waiting.
  assign hf_stall = f2_full && (|nonempty);

endmodule
