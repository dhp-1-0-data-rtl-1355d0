// tb_data_formatter: self-checking test of the 16-bit output format.
// A queue stands in for the output FIFO and is filled with several frames:
// a frame marker followed by random hits in row/column order (including an
// empty frame). The expected word stream is built here directly from the
// format definition: two frame-header words, a row header for every new
// 128-pixel row (9-bit row = row/2) carrying the common-mode value, and a
// data word {1, {row[0], col}, ADC} per hit. The link side accepts words on
// random cycles; the test also checks that a word is offered on every cycle
// the FIFO is not empty and that the word-kind flags are right.
module tb_data_formatter;
  import dhp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_rd;
  hit_t in_data;
  logic [7:0] chip_id = 8'h5c;
  logic [8:0] cm_row;
  logic [CM_W-1:0] cm_value;
  logic out_valid, out_ready = 1'b0;
  logic [15:0] out_word;
  logic word_is_row_header, word_is_frame_header;

  int checks = 0, failures = 0;
  hit_t fifo [$];
  logic [15:0] expw [$];
  bit exp_rh [$], exp_fh [$];
  int n_rh = 0, n_fh = 0, n_dw = 0;

  data_formatter dut (.*);

  always #5 clk = ~clk;

  // Common-mode source stand-in: any fixed function of the row.
  assign cm_value = CM_W'(cm_row * 7 + 3);
  assign in_valid = (fifo.size() != 0);
  assign in_data  = in_valid ? fifo[0] : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic push_word(input logic [15:0] w, input bit rh, input bit fh);
    expw.push_back(w);
    exp_rh.push_back(rh);
    exp_fh.push_back(fh);
  endtask

  task automatic make_frame(input int fid, input int n);
    int last_r9 = -1;
    int row = 0, col = 0;
    fifo.push_back(frame_marker(FRAME_W'(fid)));
    push_word({3'd1, 5'd0, chip_id}, 1'b0, 1'b1);
    push_word(16'(fid), 1'b0, 1'b1);
    for (int i = 0; i < n; i++) begin
      hit_t h;
      // Advance by a random step through the row-major pixel order.
      col += 1 + $urandom % 40;
      while (col >= 64) begin
        col -= 64;
        row += 1 + (($urandom % 3 == 0) ? $urandom % 5 : 0);
      end
      if (row > 767) break;
      h.row = ROW_W'(row);
      h.col = COL_W'(col);
      h.adc = ADC_W'(1 + $urandom % 255);
      fifo.push_back(h);
      if (row / 2 != last_r9) begin
        last_r9 = row / 2;
        push_word({1'b0, 9'(row / 2), CM_W'((row / 2) * 7 + 3)}, 1'b1, 1'b0);
      end
      push_word({1'b1, 1'(row % 2), 6'(col), h.adc}, 1'b0, 1'b0);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pop;
    make_frame(16'hfffe, 300);
    make_frame(16'hffff, 0);
    make_frame(0, 500);
    make_frame(1, 1000);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (expw.size() != 0) begin
      out_ready = ($urandom % 4) != 0;
      #1;
      check(out_valid == (fifo.size() != 0), "word offered whenever data waits");
      if (out_valid && out_ready) begin
        check(out_word == expw[0], "word content");
        if (out_word != expw[0] && failures < 20) $display("  got %h exp %h", out_word, expw[0]);
        check(word_is_row_header == exp_rh[0], "row header flag");
        check(word_is_frame_header == exp_fh[0], "frame header flag");
        n_rh += exp_rh[0];
        n_fh += exp_fh[0];
        n_dw += !(exp_rh[0] || exp_fh[0]);
        void'(expw.pop_front());
        void'(exp_rh.pop_front());
        void'(exp_fh.pop_front());
      end
      pop = in_rd;
      @(posedge clk);
      #1;
      if (pop) void'(fifo.pop_front());
    end
    check(fifo.size() == 0, "all FIFO words consumed");
    check(n_fh == 8 && n_rh > 0 && n_dw > 0, "all word kinds seen");
    $display("frame header words=%0d row headers=%0d data words=%0d", n_fh, n_rh, n_dw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
