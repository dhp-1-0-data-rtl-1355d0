// data_formatter: turns the 24-bit hit stream into 16-bit link words.
//
// It reads the output FIFO (first-word-fall-through: in_valid/in_data show
// the head, in_rd removes it) and produces the row-header data format:
//   frame marker -> frame header, 32 bit, sent as two words, upper half first:
//                   {data type (3), reserved (5), chip ID (8), frame ID (16)}
//   hit          -> a row header {0, row9, common mode (6)} when the 9-bit
//                   row address differs from the last one sent in this frame,
//                   then a data word {1, col7, ADC (8)}.
// The 9-bit row address names 128 pixels, two physical rows: row9 = row[9:1]
// and col7 = {row[0], col}. So a row header is sent at most once per 128
// pixels, and only for rows that hold hits. The common-mode value is not
// computed here: cm_row names the 9-bit row whose value is wanted and
// cm_value must return it in the same cycle.
//
// Output handshake: out_word is valid while out_valid is high and is taken
// when out_ready is high in the same cycle; one word per clock at most
// (16 bit x 80 MHz = 1.28 Gbit/s, the link's usable rate). The data type code
// and the handshake are this design's choices.
module data_formatter
  import dhp_pkg::*;
#(
  parameter logic [2:0] DATA_TYPE = DTYPE_PROCESSED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  hit_t             in_data,
  output logic             in_rd,
  input  logic [7:0]       chip_id,
  output logic [8:0]       cm_row,
  input  logic [CM_W-1:0]  cm_value,
  output logic             out_valid,
  output logic [15:0]      out_word,
  input  logic             out_ready,
  output logic             word_is_row_header,
  output logic             word_is_frame_header
);
  logic       hdr_low;      // second half of the frame header is due
  logic       row_sent;     // a row header was sent in this frame
  logic [8:0] last_row9;

  frame_header_t fh;
  logic [8:0]    row9;
  logic [6:0]    col7;
  logic          need_row_hdr;
  logic          marker;
  logic          accept;

  assign marker = is_marker(in_data);
  assign row9   = in_data.row[ROW_W-1:1];
  assign col7   = {in_data.row[0], in_data.col};
  assign cm_row = row9;
  assign need_row_hdr = !row_sent || (row9 != last_row9);

  always_comb begin
    fh.data_type = DATA_TYPE;
    fh.reserved  = '0;
    fh.chip_id   = chip_id;
    fh.frame_id  = marker_id(in_data);
  end

  assign out_valid = in_valid;
  assign accept    = in_valid && out_ready;

  always_comb begin
    word_is_row_header   = 1'b0;
    word_is_frame_header = 1'b0;
    if (marker) begin
      word_is_frame_header = 1'b1;
      out_word = hdr_low ? fh[15:0] : fh[31:16];
    end else if (need_row_hdr) begin
      word_is_row_header = 1'b1;
      out_word = row_header_t'{flag: 1'b0, row: row9, cm: cm_value};
    end else begin
      out_word = data_word_t'{flag: 1'b1, col: col7, adc: in_data.adc};
    end
  end

  assign in_rd = accept && (marker ? hdr_low : !need_row_hdr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hdr_low   <= 1'b0;
      row_sent  <= 1'b0;
      last_row9 <= '0;
    end else if (accept) begin
      if (marker) begin
        hdr_low  <= !hdr_low;
        row_sent <= 1'b0;
      end else if (need_row_hdr) begin
        row_sent  <= 1'b1;
        last_row9 <= row9;
      end
    end
  end

endmodule
