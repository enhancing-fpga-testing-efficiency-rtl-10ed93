// tb_bist_ctrl: self-checking test of bist_ctrl, with the checker and
// counters played by the testbench. Runs: a clean test (pass after exactly
// test_words checked words), a test with an errored word (fail), a test that
// loses lock (fail), and one that never locks (sync_fail after the timeout,
// here reduced to 20 cycles). Also checks the one-cycle restart/clear pulse.
module tb_bist_ctrl;
  localparam int unsigned CNT_W = 48;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CNT_W-1:0] test_words = 48'd10;
  logic             locked = 1'b0, lock_lost = 1'b0, chk_valid = 1'b0, word_err = 1'b0;
  logic [CNT_W-1:0] err_word_count = '0;
  logic             restart, cnt_clear, cnt_en, busy, done, pass, sync_fail;

  int checks = 0, failures = 0;

  bist_ctrl #(.CNT_W(CNT_W), .SYNC_TIMEOUT(20)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Start a run and check the restart pulse.
  task automatic begin_run();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(restart && cnt_clear && busy, "restart pulse after start");
    @(negedge clk);
    check(!restart && !cnt_clear && busy && !done, "restart lasts one cycle");
    check(!cnt_en, "no counting while waiting for sync");
    err_word_count = '0;
  endtask

  // Play the checker for n checked words; errored word at index bad (or -1),
  // lock lost at index drop (or -1). Returns the cycles until done.
  task automatic feed(int n, int bad, int drop, output int cycles);
    cycles = 0;
    repeat (3) @(negedge clk);     // sync takes a few cycles
    locked = 1'b1;
    @(negedge clk);                // the checker reports words after it locks
    for (int i = 0; i < 200 && !done; i++) begin
      chk_valid = (i % 3 != 2);    // gaps
      word_err  = 1'b0;
      lock_lost = 1'b0;
      if (chk_valid && cycles == bad)  word_err = 1'b1;
      if (chk_valid && cycles == drop) lock_lost = 1'b1;
      @(negedge clk);
      if (chk_valid) begin
        cycles++;
        if (word_err) err_word_count++;
      end
    end
    chk_valid = 1'b0; word_err = 1'b0; lock_lost = 1'b0;
    if (n < 0) cycles = -1;
  endtask

  initial begin
    int words;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && cnt_en, "idle after reset, counters free-running");

    // Clean run.
    begin_run();
    feed(10, -1, -1, words);
    check(done && pass && !sync_fail, "clean run passes");
    check(words == 10, $sformatf("ends after exactly test_words words (%0d)", words));
    check(!busy, "not busy when done");
    check(!cnt_en, "counters held when done");

    // Errored last word: the counters have not caught up, the word still counts.
    begin_run();
    feed(10, 9, -1, words);
    check(done && !pass, "errored word fails the run");
    // Errored word in the middle.
    begin_run();
    feed(10, 4, -1, words);
    check(done && !pass, "errored word (middle) fails the run");

    // Lost lock.
    locked = 1'b0;
    begin_run();
    feed(10, -1, 5, words);
    check(done && !pass && !sync_fail, "lost lock fails the run");

    // Never locks.
    locked = 1'b0;
    begin_run();
    repeat (18) @(negedge clk);
    check(busy && !done, "still waiting for sync");
    repeat (3) @(negedge clk);
    check(done && sync_fail && !pass, "sync timeout");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
