// tb_fifo_array1: self-checking test of the column FIFO array at its default
// size (64 columns x 16 entries). Each cycle random columns are written and
// at most one non-empty column is read. A queue per column models the
// contents; heads, non-empty flags, the lost-hit count (writes into full
// FIFOs) and the maximum fill level are compared every cycle. A first phase
// writes much faster than it reads so that FIFOs overflow.
module tb_fifo_array1;
  import dhp_pkg::*;
  localparam int unsigned N_COLS = 64;
  localparam int unsigned DEPTH  = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_COLS-1:0] wr_en = '0, rd_en = '0, nonempty;
  col_entry_t wr_data [N_COLS];
  col_entry_t head [N_COLS];
  logic [$clog2(N_COLS+1)-1:0] lost_now;
  logic [31:0] lost_cnt;
  logic [$clog2(DEPTH+1)-1:0] max_fill;
  int checks = 0, failures = 0;
  col_entry_t model [N_COLS][$];
  int exp_lost = 0, exp_max = 0;

  fifo_array1 #(.N_COLS(N_COLS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic cycle(input int wr_pct);
    int rd_col = -1;
    int n_ne = 0;
    for (int c = 0; c < N_COLS; c++) begin
      wr_en[c] = (($urandom % 100) < wr_pct);
      wr_data[c].row = ROW_W'($urandom);
      wr_data[c].adc = ADC_W'($urandom);
      if (model[c].size() != 0) begin
        n_ne++;
        if (rd_col < 0 || ($urandom % n_ne) == 0) rd_col = c;
      end
    end
    rd_en = '0;
    if (rd_col >= 0 && ($urandom % 4) != 0) rd_en[rd_col] = 1'b1;
    #1;
    for (int c = 0; c < N_COLS; c++) begin
      check(nonempty[c] == (model[c].size() != 0), "nonempty");
      if (model[c].size() != 0) check(head[c] == model[c][0], "head");
    end
    check(lost_cnt == 32'(exp_lost), "lost count");
    check(max_fill == exp_max, "max fill");
    // max_fill registers the fill levels seen before this edge.
    for (int c = 0; c < N_COLS; c++)
      if (model[c].size() > exp_max) exp_max = model[c].size();
    @(posedge clk);
    for (int c = 0; c < N_COLS; c++) begin
      bit was_full = (model[c].size() == DEPTH);
      if (rd_en[c]) void'(model[c].pop_front());
      if (wr_en[c]) begin
        if (was_full) exp_lost++;
        else model[c].push_back(wr_data[c]);
      end
    end
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) cycle(3);
    for (int i = 0; i < 400; i++) cycle(20);
    check(exp_lost > 0, "overflow exercised");
    cycle(0);
    check(exp_max == DEPTH, "a FIFO reached full depth");
    for (int i = 0; i < 3000; i++) cycle(1);
    $display("lost=%0d", exp_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
