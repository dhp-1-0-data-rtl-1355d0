// tb_dhp_top: end-to-end test of the DHP data path at its default size
// (64 columns, 768 rows, column FIFOs 16 deep, output FIFO 256 deep).
//
// Rows of random pixel data arrive every second clock (40 MHz input, 80 MHz
// core). Every non-zero pixel sent is recorded in a scoreboard keyed by
// frame, row and column. The output words are decoded as a receiver would:
// frame headers must carry the chip ID and consecutive frame IDs, row headers
// the common-mode value of their row, and every data word must match a pixel
// that was sent in that frame, in row-then-column order. At the end, pixels
// received plus pixels reported lost must equal pixels sent.
//
// Phases: (1) 1 % occupancy with the link taking one word per clock
// (16 bit x 80 MHz = 1.28 Gbit/s, the usable rate of a 1.6 Gbit/s link at
// 80 %): no loss is allowed; (2) a frame with no hits; (3) 3 % occupancy
// while the link stops for two frames: the output FIFO fills, the hit finder
// stalls, column FIFOs overflow and the input order guard refuses rows;
// (4) a drain at 1 %. Each of these mechanisms must be seen at least once.
module tb_dhp_top;
  import dhp_pkg::*;
  localparam int unsigned N_COLS = 64;
  localparam int unsigned N_ROWS = 768;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [ADC_W-1:0] in_adc [N_COLS];
  logic [7:0] chip_id = 8'hA7;
  logic [8:0] cm_row;
  logic [CM_W-1:0] cm_value;
  logic out_valid, out_ready = 1'b1;
  logic [15:0] out_word;
  logic out_is_row_header, out_is_frame_header;
  logic [31:0] lost_fifo1, lost_guard;
  logic [4:0] max_fill1;
  logic [8:0] fifo2_count;
  logic hf_stall, frame_marker_now;

  dhp_top dut (.*);

  always #5 clk = ~clk;
  assign cm_value = CM_W'(cm_row ^ 9'h15);

  int checks = 0, failures = 0;
  logic [ADC_W-1:0] sent [logic [31:0]];
  longint n_sent = 0, n_recv = 0;
  int in_row = 0, in_frame = 0;
  int occ_bp = 100;          // occupancy in units of 0.01 %
  int link_pct = 100;        // chance the link takes a word in a cycle
  // Receiver state.
  int rx_hdr_phase = 0, rx_frame = -1, rx_row9 = -1, rx_last = -1;
  logic [15:0] rx_hdr_hi;
  // Mechanism counters.
  int n_stall = 0, n_f2_full = 0, n_frame_hdr = 0, n_row_hdr = 0, n_empty_frames = 0;
  int hits_in_frame = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // Input: one row every second clock.
  task automatic send_row();
    for (int c = 0; c < N_COLS; c++) begin
      if (int'($urandom % 10000) < occ_bp) begin
        in_adc[c] = ADC_W'(1 + $urandom % 255);
        sent[{16'(in_frame), 10'(in_row), 6'(c)}] = in_adc[c];
        n_sent++;
      end else begin
        in_adc[c] = '0;
      end
    end
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    @(posedge clk); #1;
    in_row++;
    if (in_row == N_ROWS) begin
      in_row = 0;
      in_frame++;
    end
  endtask

  // Receiver: decodes and checks every accepted word.
  always @(posedge clk) begin
    if (rst_n) begin
      if (hf_stall) n_stall++;
      if (fifo2_count == 9'd256) n_f2_full++;
      if (out_valid && out_ready) begin
        if (rx_hdr_phase == 1) begin
          check(out_is_frame_header, "second frame header word");
          check(out_word == 16'(rx_frame + 1), "consecutive frame ID");
          if (rx_frame >= 0 && hits_in_frame == 0) n_empty_frames++;
          rx_frame = int'(out_word);
          rx_hdr_phase = 0;
          rx_row9 = -1;
          rx_last = -1;
          hits_in_frame = 0;
        end else if (!out_word[15] && out_is_frame_header) begin
          check(out_word == {3'd1, 5'd0, chip_id}, "frame header type/chip ID");
          rx_hdr_phase = 1;
          n_frame_hdr++;
        end else if (!out_word[15]) begin
          check(out_is_row_header, "row header flag");
          check(out_word[5:0] == CM_W'(out_word[14:6] ^ 9'h15), "common-mode value");
          check(int'(out_word[14:6]) != rx_row9, "row header only on row change");
          rx_row9 = int'(out_word[14:6]);
          n_row_hdr++;
        end else begin
          logic [9:0] row;
          logic [5:0] col;
          logic [31:0] key;
          check(!out_is_row_header && !out_is_frame_header, "data word flags");
          check(rx_row9 >= 0, "data word after a row header");
          row = {rx_row9[8:0], out_word[14]};
          col = out_word[13:8];
          key = {16'(rx_frame), row, col};
          check(int'({row, col}) > rx_last, "row/column order");
          rx_last = int'({row, col});
          check(sent.exists(key), "pixel was sent in this frame");
          if (sent.exists(key)) begin
            check(sent[key] == out_word[7:0], "ADC value");
            sent.delete(key);
          end
          n_recv++;
          hits_in_frame++;
        end
      end
    end
  end

  // Link model: takes a word on a random share of cycles.
  always @(negedge clk) out_ready = (int'($urandom % 100) < link_pct);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint lost;
    for (int c = 0; c < N_COLS; c++) in_adc[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    // (1) 1 % occupancy, full link rate: lossless.
    occ_bp = 100;
    repeat (2 * N_ROWS) send_row();
    check(lost_fifo1 == 0 && lost_guard == 0, "no loss at 1 % occupancy");
    // (2) one empty frame.
    occ_bp = 0;
    repeat (N_ROWS) send_row();
    // (3) 3 % occupancy, link stopped for two frames.
    occ_bp = 300;
    link_pct = 0;
    repeat (2 * N_ROWS) send_row();
    link_pct = 100;
    repeat (N_ROWS / 2) send_row();
    // (4) drain at 1 %.
    occ_bp = 100;
    repeat (2 * N_ROWS) send_row();
    repeat (4000) @(posedge clk);
    lost = longint'(lost_fifo1) + longint'(lost_guard);
    check(n_recv + lost == n_sent, "received + lost == sent");
    check(sent.num() == lost, "every missing pixel is counted as lost");
    check(rx_frame == in_frame, "frame header for every frame started");
    // Mechanisms.
    check(n_frame_hdr > 0 && n_row_hdr > 0 && n_recv > 0, "headers and data seen");
    check(n_empty_frames > 0, "empty frame seen");
    check(n_f2_full > 0, "output FIFO full seen");
    check(n_stall > 0, "hit finder stall seen");
    check(lost_fifo1 > 0, "column FIFO overflow seen");
    check(lost_guard > 0, "order guard seen");
    check(max_fill1 == 5'd16, "column FIFO reached full depth");
    $display("sent=%0d recv=%0d lost_fifo1=%0d lost_guard=%0d frames=%0d empty=%0d stalls=%0d f2full=%0d rowhdr=%0d",
             n_sent, n_recv, lost_fifo1, lost_guard, rx_frame + 1, n_empty_frames, n_stall, n_f2_full, n_row_hdr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
