// tb_prbs_gen: self-checking test of prbs_gen.
// Checks every pattern length against the bit-serial reference model, with
// random gaps in en (one-cycle latency, sequence holds while idle), restart,
// the user-data multiplexer (PRBS keeps running underneath), error injection
// on the next word sent, and the PRBS-7 period of 127 bits.
module tb_prbs_gen;
  import prbs_pkg::*;
  import prbs_ref_pkg::*;

  localparam int unsigned W = 64;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0, restart = 1'b0, inject_err = 1'b0;
  prbs_sel_e    sel = PRBS7;
  src_sel_e     src = SRC_PRBS;
  logic [W-1:0] user_data = '0;
  logic [W-1:0] out_data;
  logic         out_valid;

  int checks = 0, failures = 0;

  prbs_gen #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
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
    logic [W-1:0] exp_w, user_w;
    logic [W-1:0] hist  [$];
    ref_m = new(0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Every pattern, with random idle cycles.
    for (int s = 0; s <= 4; s++) begin
      @(negedge clk);
      sel = prbs_sel_e'(s);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      check(!out_valid, "no word during restart");
      ref_m.set_pattern(s);
      ref_m.reseed();
      for (int n = 0; n < 300; n++) begin
        bit go;
        go = ($urandom_range(0, 3) != 0);
        en = go;
        @(negedge clk);
        en = 1'b0;
        check(out_valid == go, $sformatf("valid follows en (pattern %0d)", s));
        if (go) begin
          exp_w = ref_m.next_word();
          check(out_data == exp_w,
                $sformatf("pattern %0d word %0d: got %h exp %h", s, n, out_data, exp_w));
          if (s == 0) hist.push_back(out_data);
        end
      end
    end

    // PRBS-7: W*127 bits is a whole number of periods, so words repeat every 127.
    for (int k = 0; k + 127 < hist.size(); k++)
      check(hist[k] == hist[k+127], "PRBS-7 period 127");

    // User data multiplexer: user words go out, the PRBS keeps advancing.
    @(negedge clk);
    sel = PRBS31;
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    ref_m.set_pattern(4);
    ref_m.reseed();
    for (int n = 0; n < 40; n++) begin
      bit use_user;
      use_user = (n % 8) >= 5;
      user_w   = {$urandom, $urandom};
      src       = use_user ? SRC_USER : SRC_PRBS;
      user_data = user_w;
      en = 1'b1;
      @(negedge clk);
      exp_w = ref_m.next_word();
      check(out_data == (use_user ? user_w : exp_w), $sformatf("mux word %0d", n));
    end
    src = SRC_PRBS;

    // Error injection: bit 0 of the next word is flipped, once.
    inject_err = 1'b1;
    @(negedge clk);
    inject_err = 1'b0;
    exp_w = ref_m.next_word();
    check(out_data == (exp_w ^ W'(1)), "injected error flips bit 0");
    @(negedge clk);
    exp_w = ref_m.next_word();
    check(out_data == exp_w, "only one word is hit");
    // Injection requested while idle applies to the next word sent.
    en = 1'b0;
    inject_err = 1'b1;
    @(negedge clk);
    inject_err = 1'b0;
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    exp_w = ref_m.next_word();
    check(out_data == (exp_w ^ W'(1)), "pending injection");
    en = 1'b0;

    // Asynchronous reset reseeds.
    rst_n = 1'b0;
    #2;
    rst_n = 1'b1;
    ref_m.reseed();
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check(out_data == ref_m.next_word(), "after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
