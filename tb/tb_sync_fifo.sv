// tb_sync_fifo: self-checking test of the output FIFO at its default size
// (256 x 24 bit). A queue model receives the same accepted writes; the test
// compares head data, count, full and empty every cycle, fills the FIFO to
// full to check that an extra write is refused, drains it to empty, and then
// runs random simultaneous reads and writes.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 24;
  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Compare outputs with the model, then apply the stimulus at the edge.
  task automatic step(input bit w, input bit r);
    bit w_ok;
    wr_en   = w;
    rd_en   = r && (model.size() != 0);
    wr_data = WIDTH'($urandom);
    #1;
    check(count == model.size(), "count");
    check(full  == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() != 0) check(rd_data == model[0], "head data");
    w_ok = wr_en && (model.size() < DEPTH);
    @(posedge clk);
    if (rd_en) void'(model.pop_front());
    if (w_ok) model.push_back(wr_data);
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
    // Fill completely, then try two extra writes.
    for (int i = 0; i < DEPTH + 2; i++) step(1'b1, 1'b0);
    check(full && model.size() == DEPTH, "filled to depth");
    // Read and write at the same time while full: the write is refused.
    step(1'b1, 1'b1);
    check(count == DEPTH - 1, "full: read accepted, write refused");
    // Drain.
    while (model.size() != 0) step(1'b0, 1'b1);
    check(empty, "drained");
    // Random traffic.
    for (int i = 0; i < 4000; i++) step(($urandom % 3) != 0, ($urandom % 2) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
