// tb_zero_suppress: self-checking test of the input stage at its default size
// (64 columns, 768 rows per frame). Rows of random ADC values (about 10 %
// non-zero) arrive every second clock. The test checks one cycle later that
// exactly the non-zero channels are written, with the right row number and
// value, that the frame number steps after row 767, and that rows a whole
// frame ahead of the reported hit finder position are refused and their hits
// counted.
module tb_zero_suppress;
  import dhp_pkg::*;
  localparam int unsigned N_COLS = 64;
  localparam int unsigned N_ROWS = 768;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [ADC_W-1:0] in_adc [N_COLS];
  logic [FRAME_W-1:0] hf_frame = '0;
  logic [ROW_W:0] hf_row = '0;
  logic [N_COLS-1:0] wr_en;
  col_entry_t wr_data [N_COLS];
  logic [FRAME_W-1:0] wr_frame;
  logic [31:0] guard_lost;
  int checks = 0, failures = 0;
  int exp_row = 0, exp_frame = 0, exp_lost = 0, blocked_rows = 0;

  zero_suppress #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s row=%0d frame=%0d", what, exp_row, exp_frame);
    end
  endtask

  task automatic send_row(input bit expect_block);
    logic [ADC_W-1:0] v [N_COLS];
    int nz = 0;
    for (int c = 0; c < N_COLS; c++) begin
      v[c] = (($urandom % 10) == 0) ? ADC_W'(1 + $urandom % 255) : '0;
      in_adc[c] = v[c];
      nz += (v[c] != 0);
    end
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    for (int c = 0; c < N_COLS; c++) begin
      check(wr_en[c] == (!expect_block && v[c] != 0), "write enable");
      if (wr_en[c]) begin
        check(wr_data[c].row == ROW_W'(exp_row), "row number");
        check(wr_data[c].adc == v[c], "adc value");
      end
    end
    check(wr_frame == FRAME_W'(exp_frame), "frame number");
    if (expect_block) begin
      exp_lost += nz;
      blocked_rows++;
    end
    check(guard_lost == 32'(exp_lost), "guard loss count");
    @(posedge clk); #1;
    check(wr_en == '0, "no write between rows");
    exp_row++;
    if (exp_row == N_ROWS) begin
      exp_row = 0;
      exp_frame++;
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N_COLS; c++) in_adc[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    // Two frames with the hit finder close behind.
    for (int r = 0; r < 2 * N_ROWS; r++) begin
      hf_frame = FRAME_W'(exp_frame);
      hf_row   = '0;
      send_row(1'b0);
    end
    // Hit finder stuck in the previous frame at row 100: rows 0..99 are
    // accepted, rows from 100 on are a whole frame ahead and refused.
    hf_frame = FRAME_W'(exp_frame - 1);
    hf_row   = 11'd100;
    for (int r = 0; r < 200; r++) send_row(exp_row >= 100);
    // Two frames behind: everything is refused.
    hf_frame = FRAME_W'(exp_frame - 2);
    for (int r = 0; r < 10; r++) send_row(1'b1);
    check(blocked_rows == 110, "guard exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
