// tb_ber_inject: self-checking test of ber_inject at W = 64. A random word
// stream with random gaps passes through; the testbench keeps its own count
// of valid words and its own rotating offset, and checks that exactly every
// period-th word is hit, with nbits adjacent bits (wrapping at bit 63) flipped
// at the expected offset, that other words pass unchanged, and that disabling
// or clearing restarts the count. Several period/nbits settings are used,
// including period 1 and flipping all bits.
module tb_ber_inject;
  localparam int unsigned W  = 64;
  localparam int unsigned EW = $clog2(W + 1);

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [31:0]   period = 32'd1;
  logic [EW-1:0] nbits = '0;
  logic          in_valid = 1'b0;
  logic [W-1:0]  in_data = '0;
  logic          out_valid, hit;
  logic [W-1:0]  out_data;

  int checks = 0, failures = 0;

  ber_inject dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run n cycles with the given setting and check every word.
  task automatic run(int unsigned per, int unsigned nb, int n);
    int unsigned cnt, off, hits;
    cnt = 0; off = 0; hits = 0;
    period = per; nbits = EW'(nb);
    en = 1'b1;
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] exp_mask;
      bit v, exp_hit;
      v = ($urandom_range(0, 3) != 0);
      in_valid = v;
      in_data  = {$urandom, $urandom};
      #1;
      exp_hit  = v && nb != 0 && (cnt + 1 >= per);
      exp_mask = '0;
      if (exp_hit)
        for (int b = 0; b < (nb >= W ? W : nb); b++) exp_mask[(off + b) % W] = 1'b1;
      check(out_valid == v, "valid passes through");
      check(hit == exp_hit, $sformatf("hit at word %0d (period %0d)", cnt, per));
      check(out_data == (in_data ^ exp_mask), $sformatf("mask per %0d nb %0d off %0d", per, nb, off));
      @(negedge clk);
      if (v) begin
        if (exp_hit) begin
          cnt = 0;
          off = (off + nb % W) % W;
          hits++;
        end else cnt++;
      end
    end
    in_valid = 1'b0;
    // Disable: counters restart.
    en = 1'b0;
    @(negedge clk);
    in_valid = 1'b1;
    #1;
    check(!hit && out_data == in_data, "disabled: no injection");
    @(negedge clk);
    in_valid = 1'b0;
    check(hits > 0, "hits happened");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1, 1, 200);
    run(5, 3, 500);
    run(37, 13, 2000);
    run(1, 64, 50);
    run(3, 6, 400);
    // clear restarts the period count.
    period = 4; nbits = 1; en = 1'b1;
    in_valid = 1'b1;
    repeat (2) @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    #1;
    check(!hit, "after clear, word 1 of 4");
    @(negedge clk); #1; check(!hit, "word 2 of 4");
    @(negedge clk); #1; check(!hit, "word 3 of 4");
    @(negedge clk); #1; check(hit, "word 4 of 4 hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
