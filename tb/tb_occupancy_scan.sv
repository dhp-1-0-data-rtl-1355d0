// tb_occupancy_scan: loss measurement of the full-size data path under random
// pixel occupancy, untriggered (every frame is read out), with the link
// taking one 16-bit word per clock (1.28 Gbit/s usable).
//
// For each occupancy point the test resets the design, sends FRAMES frames of
// rows in which every pixel is hit with the given probability, lets the path
// drain and counts data words received against hits sent and hits reported
// lost. Checks: received + lost == sent at every point; at 2 % occupancy the
// loss stays below 1 % (the link carries about 0.87 words per clock); at 3 %
// the link needs about 1.2 words per clock, so losses must appear and must all
// be accounted for. The measured loss and the FIFO fill levels are printed.
module tb_occupancy_scan;
  import dhp_pkg::*;
  localparam int unsigned N_COLS = 64;
  localparam int unsigned N_ROWS = 768;
  localparam int FRAMES = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [ADC_W-1:0] in_adc [N_COLS];
  logic [7:0] chip_id = 8'h01;
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
  assign cm_value = cm_row[5:0];

  int checks = 0, failures = 0;
  longint n_sent, n_recv, n_words;
  int max_f2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      n_words++;
      if (out_word[15] && !out_is_frame_header) n_recv++;
    end
    if (rst_n && int'(fifo2_count) > max_f2) max_f2 = int'(fifo2_count);
  end

  task automatic run_point(input int occ_bp, output real loss_pct);
    n_sent = 0; n_recv = 0; n_words = 0; max_f2 = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < FRAMES * int'(N_ROWS); r++) begin
      for (int c = 0; c < N_COLS; c++) begin
        in_adc[c] = (int'($urandom % 10000) < occ_bp) ? ADC_W'(1 + $urandom % 255) : '0;
        n_sent += (in_adc[c] != 0);
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(n_recv + longint'(lost_fifo1) + longint'(lost_guard) == n_sent,
          $sformatf("accounting at %0d.%02d %%", occ_bp / 100, occ_bp % 100));
    loss_pct = 100.0 * real'(n_sent - n_recv) / real'(n_sent);
    $display("occupancy %0d.%02d %%: sent=%0d received=%0d lost=%0d (%.2f %%) link words/clk=%.3f max fifo1=%0d max fifo2=%0d",
             occ_bp / 100, occ_bp % 100, n_sent, n_recv, n_sent - n_recv, loss_pct,
             real'(n_words) / real'(FRAMES * 2 * N_ROWS), max_fill1, max_f2);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real l2, l3;
    for (int c = 0; c < N_COLS; c++) in_adc[c] = '0;
    run_point(200, l2);
    check(l2 < 1.0, "loss below 1 % at 2 % occupancy");
    run_point(300, l3);
    check(l3 > 0.0, "bandwidth loss appears at 3 % occupancy without triggers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
