// dhp_pkg: types and constants shared by the DHP hit data path.
//
// The data path handles a pixel matrix read out one row of 64 columns at a
// time: rows are numbered 0..767 (10 bits), columns 0..63 (6 bits), and each
// pixel carries an 8-bit ADC value. These sizes follow the chip's address
// naming convention. Inside the chip two word formats are used:
//   * a column-FIFO entry of 18 bits, {row, ADC}: the column is implied by the
//     FIFO that holds it (64 x 16 x 18 bit = 18 kbit, matching the FIFO budget);
//   * a 24-bit hit word, {row, column, ADC}, the generic hit format written
//     into the output FIFO.
// A hit word whose ADC field is zero never occurs for real data (zero
// suppression removes zero values), so this design uses it as an in-band frame
// marker whose row/column fields carry the 16-bit frame ID. That marker is a
// choice of this design.
//
// The 16-bit link words (frame header, row header, data word) follow the
// "reordered" row-header format: a 9-bit row address names 128 pixels (two
// physical rows) and a 7-bit column address is {row[0], column}. The data type
// encoding of the frame header (raw = 0, processed = 1) is this design's own.
package dhp_pkg;

  localparam int unsigned ROW_W      = 10;
  localparam int unsigned COL_W      = 6;
  localparam int unsigned ADC_W      = 8;
  localparam int unsigned FRAME_W    = 16;   // frame ID width
  localparam int unsigned CM_W       = 6;    // common-mode value width

  // Entry of one column FIFO (Fifo array 1).
  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [ADC_W-1:0] adc;
  } col_entry_t;

  // Generic 24-bit hit word (Fifo 2 contents).
  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    logic [ADC_W-1:0] adc;
  } hit_t;

  // 32-bit frame header, sent as two 16-bit link words, upper half first.
  typedef struct packed {
    logic [2:0]         data_type;
    logic [4:0]         reserved;
    logic [7:0]         chip_id;
    logic [FRAME_W-1:0] frame_id;
  } frame_header_t;

  // 16-bit row header: flag 0.
  typedef struct packed {
    logic            flag;
    logic [8:0]      row;
    logic [CM_W-1:0] cm;
  } row_header_t;

  // 16-bit data word: flag 1.
  typedef struct packed {
    logic       flag;
    logic [6:0] col;
    logic [7:0] adc;
  } data_word_t;

  localparam logic [2:0] DTYPE_RAW       = 3'd0;
  localparam logic [2:0] DTYPE_PROCESSED = 3'd1;

  // Frame marker carried through the output FIFO.
  function automatic hit_t frame_marker(input logic [FRAME_W-1:0] id);
    hit_t m;
    {m.row, m.col} = id;
    m.adc = '0;
    return m;
  endfunction

  function automatic logic is_marker(input hit_t h);
    return h.adc == '0;
  endfunction

  function automatic logic [FRAME_W-1:0] marker_id(input hit_t h);
    return {h.row, h.col};
  endfunction

endpackage
