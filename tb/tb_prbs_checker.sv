// tb_prbs_checker: self-checking test of prbs_checker at W = 64 with its
// default SYNC_WORDS = LOSS_WORDS = 4. Words come from the bit-serial
// reference model. Checked: no lock on random data or on an all-zero line;
// lock after exactly one seed word plus four matching words; one-cycle result
// latency; exact word and bit error counts for injected errors while locked
// (a flipped bit counts once, the reference does not reseed); loss of lock
// after four errored words in a row and relock; restart; all pattern lengths.
module tb_prbs_checker;
  import prbs_pkg::*;
  import prbs_ref_pkg::*;

  localparam int unsigned W  = 64;
  localparam int unsigned EW = $clog2(W + 1);

  logic          clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  prbs_sel_e     sel = PRBS31;
  logic          in_valid = 1'b0;
  logic [W-1:0]  in_data = '0;
  logic          locked, chk_valid, word_err, lock_lost;
  logic [EW-1:0] err_bits;

  int checks = 0, failures = 0;
  int lost_seen = 0;

  prbs_checker #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (lock_lost) lost_seen++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // Present one word; return after the clock edge that takes it.
  task automatic send(logic [W-1:0] w);
    in_valid = 1'b1;
    in_data  = w;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic do_restart();
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prbs_ref #(W) ref_m;
    logic [W-1:0] w, flip;
    ref_m = new(4);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Random words never lock.
    for (int n = 0; n < 50; n++) begin
      send({$urandom, $urandom});
      check(!locked && !chk_valid, "no lock on random data");
    end
    // An all-zero line never locks.
    for (int n = 0; n < 20; n++) begin
      send('0);
      check(!locked, "no lock on all-zero line");
    end

    // Every pattern: lock after 1 + SYNC_WORDS words, then clean checking.
    for (int s = 0; s <= 4; s++) begin
      sel = prbs_sel_e'(s);
      ref_m.set_pattern(s);
      ref_m.reseed();
      do_restart();
      // Start somewhere in the sequence.
      repeat ($urandom_range(0, 50)) void'(ref_m.next_word());
      for (int n = 0; n < 5; n++) begin
        check(!locked, $sformatf("pattern %0d not locked before word %0d", s, n));
        send(ref_m.next_word());
      end
      check(locked, $sformatf("pattern %0d locked after 5 words", s));
      for (int n = 0; n < 100; n++) begin
        send(ref_m.next_word());
        check(chk_valid && !word_err && err_bits == 0,
              $sformatf("pattern %0d clean word %0d", s, n));
        // Gaps in in_valid are allowed.
        if (n % 9 == 0) begin
          @(negedge clk);
          check(!chk_valid, "no result without a word");
        end
      end
    end

    // Injected errors while locked (PRBS-31 currently selected).
    for (int n = 0; n < 200; n++) begin
      int k;
      k = (n % 3 == 0) ? $urandom_range(1, 3) : 0;
      flip = '0;
      for (int i = 0; i < k; i++) flip[$urandom_range(0, W-1)] = 1'b1;
      w = ref_m.next_word();
      send(w ^ flip);
      check(chk_valid, "checked");
      check(word_err == (flip != '0), $sformatf("word_err for %0d flips", $countones(flip)));
      check(err_bits == EW'($countones(flip)), $sformatf("err_bits %0d vs %0d", err_bits, $countones(flip)));
      check(locked, "single errored words keep lock");
    end

    // Four errored words in a row lose lock.
    for (int n = 0; n < 4; n++) begin
      check(locked, "still locked before the fourth errored word");
      send(ref_m.next_word() ^ W'(3));
    end
    check(!locked && lost_seen == 1, "lock lost after four errored words");
    // Relock on the continuing stream.
    for (int n = 0; n < 5; n++) send(ref_m.next_word());
    check(locked, "relocked");

    // Restart drops lock.
    do_restart();
    check(!locked, "restart returns to hunt");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
