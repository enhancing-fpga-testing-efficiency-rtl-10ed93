// tb_prbs_bist_top: end-to-end test of prbs_bist_top at its default
// parameters (64-bit words, 48-bit counters). A small channel model stands in
// for the serial transceiver in external loopback: it returns tx_data after a
// fixed delay. The test runs complete BIST sequences (start -> sync -> run ->
// done) and checks pass/fail and the BER counters against what was injected.
// Mechanisms exercised and counted (each must occur at least once):
//   runs of every pattern length (run-time pattern switch), near-end and
//   external loopback, multiplier test with several fixed operands 2^k,
//   injected bit errors counted exactly, a programmed bit error rate,
//   user data switched in mid-run
//   (lock loss and resynchronization), idle gaps in tx_en, a sync timeout,
//   and the multiplier in user mode (products checked against '*').
// The latency from injecting an error to its appearance in the counters is
// checked: 4 clocks in near-end loopback (generator, multiplier, checker and
// counter registers), so 3 clocks or 19.2 ns at 156.25 MHz from a word on
// tx_data to its result in the counters.
module tb_prbs_bist_top;
  import prbs_pkg::*;

  localparam int unsigned W     = 64;
  localparam int unsigned CNT_W = 48;
  localparam int unsigned DELAY = 5;     // channel model delay, clocks

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start = 1'b0;
  logic [CNT_W-1:0] test_words = '0;
  prbs_sel_e        pattern_sel = PRBS31;
  src_sel_e         src_sel = SRC_PRBS;
  logic [W-1:0]     user_data = '0;
  logic             tx_en = 1'b1, inject_err = 1'b0, loopback_near = 1'b1;
  logic             ber_inj_en = 1'b0;
  logic [31:0]      ber_inj_period = 32'd1;
  logic [6:0]       ber_inj_bits = '0;
  mul_mode_e        mul_mode = MUL_BIST;
  logic [5:0]       mul_shift = '0;
  logic [W-1:0]     mul_operand = '0;
  logic [W-1:0]     tx_data, rx_data;
  logic             tx_valid, rx_valid;
  logic [2*W-1:0]   product;
  logic             product_valid, locked;
  logic [CNT_W-1:0] bit_count, err_bit_count, word_count, err_word_count;
  logic             busy, done, pass, sync_fail;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_pattern [0:4];
  int n_near = 0, n_ext = 0, n_inject = 0, n_lock_loss = 0, n_resync = 0;
  int n_shift = 0, n_gap = 0, n_timeout = 0, n_user_mul = 0, n_pass = 0;
  int n_rate = 0;

  prbs_bist_top dut (.*);

  always #3.2ns clk = ~clk;     // 156.25 MHz

  // Channel model: fixed delay, link up only while channel_up is set.
  logic         channel_up = 1'b1;
  logic [W-1:0] pipe_d [0:DELAY-1];
  logic         pipe_v [0:DELAY-1];
  always_ff @(posedge clk) begin
    pipe_d[0] <= tx_data;
    pipe_v[0] <= tx_valid && channel_up;
    for (int i = 1; i < DELAY; i++) begin
      pipe_d[i] <= pipe_d[i-1];
      pipe_v[i] <= pipe_v[i-1];
    end
  end
  assign rx_data  = pipe_d[DELAY-1];
  assign rx_valid = pipe_v[DELAY-1];

  always @(posedge clk) begin
    if (dut.lock_lost) n_lock_loss++;
    if (!tx_en) n_gap++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One complete BIST run. n_err single-bit errors are injected while locked.
  task automatic bist_run(prbs_sel_e pat, bit near, int shift, int words,
                          int n_err, bit gaps, bit user_burst, string tag);
    int injected, cyc;
    bit was_user;
    injected = 0;
    was_user = 1'b0;
    pattern_sel   = pat;
    loopback_near = near;
    mul_mode      = MUL_BIST;
    mul_shift     = 6'(shift);
    test_words    = CNT_W'(words);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (2) @(negedge clk);     // restart reaches the checker and counters
    cyc = 0;
    while (!done && cyc < 50000) begin
      tx_en = gaps ? ($urandom_range(0, 4) != 0) : 1'b1;
      if (locked && injected < n_err && word_count > 0 &&
          word_count + 40 < CNT_W'(words) && $urandom_range(0, 30) == 0) begin
        inject_err = 1'b1;
        injected++;
      end
      if (user_burst && locked && word_count > 20 && !was_user) begin
        src_sel   = SRC_USER;
        user_data = {$urandom, $urandom};
        was_user  = 1'b1;
      end else if (src_sel == SRC_USER && $urandom_range(0, 7) == 0) begin
        src_sel = SRC_PRBS;
      end else if (src_sel == SRC_USER) begin
        user_data = {$urandom, $urandom};
      end
      @(negedge clk);
      inject_err = 1'b0;
      cyc++;
    end
    tx_en   = 1'b1;
    src_sel = SRC_PRBS;
    check(done && !sync_fail, {tag, ": run completes"});
    if (user_burst) begin
      check(!pass, {tag, ": user data burst fails the run"});
      check(err_word_count > 0, {tag, ": user data burst shows errors"});
    end else begin
      check(pass == (n_err == 0), {tag, ": pass/fail"});
      check(injected == n_err, {tag, ": all errors injected"});
      check(err_bit_count == CNT_W'(n_err) && err_word_count == CNT_W'(n_err),
            $sformatf("%s: %0d injected, %0d bit errors, %0d errored words",
                      tag, n_err, err_bit_count, err_word_count));
      check(word_count == CNT_W'(words) && bit_count == CNT_W'(words * W),
            $sformatf("%s: %0d words, %0d bits", tag, word_count, bit_count));
      n_inject += injected;
    end
    if (pass) n_pass++;
    n_pattern[int'(pat)]++;
    if (near) n_near++; else n_ext++;
    if (shift != 0) n_shift++;
  endtask

  initial begin
    int n_before, lat;
    foreach (n_pattern[i]) n_pattern[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // Clean runs: every pattern, both loopbacks, several fixed operands.
    bist_run(PRBS7,  1'b1, 0,  300, 0, 1'b0, 1'b0, "prbs7 near");
    bist_run(PRBS9,  1'b0, 1,  300, 0, 1'b0, 1'b0, "prbs9 ext x2");
    bist_run(PRBS15, 1'b1, 17, 300, 0, 1'b1, 1'b0, "prbs15 near x2^17 gaps");
    bist_run(PRBS23, 1'b0, 40, 300, 0, 1'b0, 1'b0, "prbs23 ext x2^40");
    bist_run(PRBS31, 1'b1, 63, 300, 0, 1'b0, 1'b0, "prbs31 near x2^63");

    // Injected errors, counted exactly.
    bist_run(PRBS31, 1'b1, 5,  600, 4, 1'b0, 1'b0, "prbs31 near 4 errors");
    bist_run(PRBS7,  1'b0, 0,  600, 3, 1'b1, 1'b0, "prbs7 ext 3 errors gaps");

    // Programmed bit error rate: 3 bits every 37 words = 1.27e-3.
    ber_inj_en = 1'b1;
    ber_inj_period = 32'd37;
    ber_inj_bits = 7'd3;
    pattern_sel = PRBS23;
    loopback_near = 1'b0;
    test_words = 48'd3700;
    n_before = n_lock_loss;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(!pass && !sync_fail, "rate injection fails the run");
    check(err_bit_count == 3 * err_word_count, "3 bits per errored word");
    check(err_word_count >= 99 && err_word_count <= 101,
          $sformatf("about 100 errored words in 3700 (%0d)", err_word_count));
    check(n_lock_loss == n_before, "rate injection keeps lock");
    $display("applied BER 3/(64*37) = %e, measured %e", 3.0 / (64.0 * 37.0),
             real'(err_bit_count) / real'(bit_count));
    if (err_word_count > 0) n_rate++;
    ber_inj_en = 1'b0;

    // User data switched in mid-run: lock lost, resync, run fails.
    n_before = n_lock_loss;
    bist_run(PRBS15, 1'b1, 0, 400, 0, 1'b0, 1'b1, "user data burst");
    check(n_lock_loss > n_before, "lock lost during user data");
    check(locked, "resynchronized after user data");
    if (locked && n_lock_loss > n_before) n_resync++;

    // Error-to-counter latency in near-end loopback.
    test_words = 48'd200;
    pattern_sel = PRBS31;
    loopback_near = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!locked) @(negedge clk);
    repeat (10) @(negedge clk);
    n_before = int'(err_bit_count);
    inject_err = 1'b1;
    lat = 0;
    @(negedge clk);
    inject_err = 1'b0;
    lat = 1;
    while (int'(err_bit_count) == n_before && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 4, $sformatf("inject to counter latency %0d clocks, expected 4", lat));
    while (!done) @(negedge clk);

    // Link down: no lock, sync timeout.
    channel_up = 1'b0;
    loopback_near = 1'b0;
    test_words = 48'd100;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(sync_fail && !pass, "sync timeout with the link down");
    if (sync_fail) n_timeout++;
    channel_up = 1'b1;

    // Multiplier in user mode: products of the user's operands.
    loopback_near = 1'b1;
    mul_mode = MUL_USER;
    src_sel  = SRC_USER;
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] a_v, b_v;
      a_v = (n % 10 == 0) ? '1 : {$urandom, $urandom};
      b_v = (n % 13 == 0) ? '1 : {$urandom, $urandom};
      user_data   = a_v;
      mul_operand = b_v;
      @(negedge clk);     // word leaves the generator
      @(negedge clk);     // product registered
      check(product_valid && product == (2*W)'(a_v) * (2*W)'(b_v),
            $sformatf("user product %h*%h", a_v, b_v));
      n_user_mul++;
    end
    src_sel  = SRC_PRBS;
    mul_mode = MUL_BIST;

    // Every mechanism must have happened.
    foreach (n_pattern[i]) check(n_pattern[i] > 0, $sformatf("pattern %0d used", i));
    check(n_near > 0,      "near-end loopback used");
    check(n_ext > 0,       "external loopback used");
    check(n_shift > 0,     "multiplier fixed operand other than 1");
    check(n_inject > 0,    "errors injected");
    check(n_lock_loss > 0, "lock loss");
    check(n_resync > 0,    "resynchronization");
    check(n_gap > 0,       "idle gaps");
    check(n_timeout > 0,   "sync timeout");
    check(n_user_mul > 0,  "multiplier user mode");
    check(n_pass > 0,      "passing runs");
    check(n_rate > 0,      "bit error rate applied");
    $display("mechanisms: patterns %0d/%0d/%0d/%0d/%0d near %0d ext %0d shift %0d inject %0d lockloss %0d resync %0d gaps %0d timeout %0d usermul %0d pass %0d",
             n_pattern[0], n_pattern[1], n_pattern[2], n_pattern[3], n_pattern[4],
             n_near, n_ext, n_shift, n_inject, n_lock_loss, n_resync, n_gap,
             n_timeout, n_user_mul, n_pass);
    $display("rate injection runs %0d", n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
