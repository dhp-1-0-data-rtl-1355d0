// tb_hit_finder: self-checking test of the hit finder at its default size
// (64 columns, 768 rows). Column FIFOs are modelled by queues in the test.
// Each frame gets random hits (random rows, columns and non-zero ADC values);
// the expected output is the frame marker followed by the hits sorted by row,
// then column. Entries of the next frame are added half-way through a frame,
// only in rows the hit finder has already passed (as the input stage
// guarantees), so frames overlap in the FIFOs. Some frames have no hits; in
// some the output FIFO reports full on random cycles. Besides the order the
// test checks the rate: one word on every cycle the output is not full,
// until the work is done.
module tb_hit_finder;
  import dhp_pkg::*;
  localparam int unsigned N_COLS = 64;
  localparam int unsigned N_ROWS = 768;
  localparam int unsigned N_FRAMES = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  col_entry_t head [N_COLS];
  logic [N_COLS-1:0] nonempty, rd_en;
  logic [FRAME_W-1:0] wr_frame = '0;
  logic out_full = 1'b0, out_valid, marker_now;
  hit_t out_data;
  logic [FRAME_W-1:0] hf_frame;
  logic [ROW_W:0] hf_row;

  int checks = 0, failures = 0;
  col_entry_t q [N_COLS][$];
  hit_t expq [$];          // expected output words, in order
  int idle_cycles = 0, stall_cycles = 0, markers = 0, hits_out = 0;
  int stall_pct = 0;

  hit_finder #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      nonempty[c] = (q[c].size() != 0);
      head[c]     = nonempty[c] ? q[c][0] : '0;
    end
  end

  // Random hits of one frame in rows [lo, hi], sorted list appended to expq.
  task automatic make_hits(input int lo, input int hi, input int n);
    hit_t lst [$];
    bit used [N_ROWS][N_COLS];
    for (int i = 0; i < n; i++) begin
      hit_t h;
      h.row = ROW_W'(lo + $urandom % (hi - lo + 1));
      h.col = COL_W'($urandom % N_COLS);
      h.adc = ADC_W'(1 + $urandom % 255);
      if (!used[h.row][h.col]) begin
        used[h.row][h.col] = 1'b1;
        lst.push_back(h);
      end
    end
    lst.sort() with ({item.row, item.col});
    foreach (lst[i]) begin
      q[lst[i].col].push_back('{row: lst[i].row, adc: lst[i].adc});
      expq.push_back(lst[i]);
    end
  endtask

  // One clock: randomise out_full, compare the output word, apply pops.
  task automatic tick();
    logic [N_COLS-1:0] pops;
    out_full = (($urandom % 100) < stall_pct);
    #1;
    if (out_full) begin
      stall_cycles++;
      check(!out_valid && rd_en == '0, "no output while full");
    end else if (expq.size() != 0) begin
      check(out_valid, "one word per clock");
      if (out_valid) begin
        check(out_data == expq[0], "word order and content");
        if (out_data != expq[0] && failures < 20)
          $display("  got %h exp %h", out_data, expq[0]);
        if (is_marker(out_data)) markers++; else hits_out++;
        check(marker_now == is_marker(out_data), "marker flag");
        void'(expq.pop_front());
      end
    end else begin
      check(!out_valid, "idle when nothing is due");
      idle_cycles++;
    end
    pops = rd_en;
    @(posedge clk);
    #1;
    for (int c = 0; c < N_COLS; c++) if (pops[c]) void'(q[c].pop_front());
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hits;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    // Frame 0 (with hits) after reset.
    wr_frame = 16'd0;
    expq.push_back(frame_marker(16'd0));
    make_hits(0, N_ROWS - 1, 600);
    for (int f = 0; f < N_FRAMES; f++) begin
      stall_pct = (f % 3 == 2) ? 30 : 0;
      n_hits = (f % 4 == 3) ? 0 : 50 + $urandom % 700;
      // Let the finder work part of the way through this frame.
      repeat (100 + $urandom % 200) tick();
      // Next frame begins: hits only in rows already passed.
      wr_frame = FRAME_W'(f + 1);
      expq.push_back(frame_marker(FRAME_W'(f + 1)));
      if (n_hits != 0 && hf_row > 0 && hf_row < N_ROWS)
        make_hits(0, int'(hf_row) - 1, n_hits / 4);
      // Rest of the frame: the finder must drain all and report the marker.
      while (expq.size() != 0) tick();
      if (n_hits != 0) make_hits(int'(hf_row), N_ROWS - 1, n_hits);
    end
    while (expq.size() != 0) tick();
    repeat (5) tick();
    check(markers == N_FRAMES + 1, "one marker per frame");
    check(stall_cycles > 0, "stall exercised");
    check(hf_frame == FRAME_W'(N_FRAMES), "final frame");
    $display("hits=%0d markers=%0d stalls=%0d idle=%0d", hits_out, markers, stall_cycles, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
