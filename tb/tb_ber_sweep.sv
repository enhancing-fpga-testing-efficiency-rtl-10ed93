// tb_ber_sweep: bit error rate sweep through the whole design at its default
// parameters, over the applied-BER range 1e-1 to 1e-9. For each rate,
// ber_inject is programmed with nbits flipped every period-th word
// (BER = nbits / (64 * period)), one BIST run of a given number of words is
// made in external loopback through a 3-clock channel model, and the counters
// are compared with the applied rate: every errored word must carry exactly
// nbits errors, the errored-word count must be the number of injection points
// in the run (within one, for the alignment of the first hit), lock must
// never be lost, and the run must fail. Runs are sized to give at least one
// injection per rate; the lowest rates therefore run for millions of words.
module tb_ber_sweep;
  import prbs_pkg::*;

  localparam int unsigned W     = 64;
  localparam int unsigned CNT_W = 48;

  typedef struct {
    real         ber;       // nominal rate
    int unsigned nbits;
    int unsigned period;
    longint      words;
  } rate_t;

  localparam int NR = 9;
  rate_t rates [NR] = '{
    '{1e-1, 51, 8,         8000},
    '{1e-2, 32, 50,        20000},
    '{1e-3, 8,  125,       25000},
    '{1e-4, 8,  1250,      50000},
    '{1e-5, 8,  12500,     125000},
    '{1e-6, 8,  125000,    500000},
    '{1e-7, 64, 10000000,  10000100},
    '{1e-8, 8,  12500000,  12500100},
    '{1e-9, 1,  15625000,  15625100}
  };

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start = 1'b0;
  logic [CNT_W-1:0] test_words = '0;
  prbs_sel_e        pattern_sel = PRBS31;
  src_sel_e         src_sel = SRC_PRBS;
  logic [W-1:0]     user_data = '0;
  logic             tx_en = 1'b1, inject_err = 1'b0, loopback_near = 1'b0;
  logic             ber_inj_en = 1'b0;
  logic [31:0]      ber_inj_period = 32'd1;
  logic [6:0]       ber_inj_bits = '0;
  mul_mode_e        mul_mode = MUL_BIST;
  logic [5:0]       mul_shift = 6'd0;
  logic [W-1:0]     mul_operand = '0;
  logic [W-1:0]     tx_data, rx_data;
  logic             tx_valid, rx_valid;
  logic [2*W-1:0]   product;
  logic             product_valid, locked;
  logic [CNT_W-1:0] bit_count, err_bit_count, word_count, err_word_count;
  logic             busy, done, pass, sync_fail;

  int checks = 0, failures = 0;
  int lock_losses = 0;

  prbs_bist_top dut (.*);

  always #3.2ns clk = ~clk;

  // Channel model: 3-clock delay.
  logic [W-1:0] d1, d2, d3;
  logic         v1, v2, v3;
  always_ff @(posedge clk) begin
    {d1, v1} <= {tx_data, tx_valid};
    {d2, v2} <= {d1, v1};
    {d3, v3} <= {d2, v2};
  end
  assign rx_data  = d3;
  assign rx_valid = v3;

  always @(posedge clk) if (dut.lock_lost) lock_losses++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (60000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    foreach (rates[r]) begin
      real applied, measured;
      longint expect_hits;
      int losses0;
      losses0        = lock_losses;
      ber_inj_en     = 1'b1;
      ber_inj_bits   = 7'(rates[r].nbits);
      ber_inj_period = 32'(rates[r].period);
      test_words     = CNT_W'(rates[r].words);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      applied     = real'(rates[r].nbits) / (64.0 * real'(rates[r].period));
      measured    = real'(err_bit_count) / real'(bit_count);
      expect_hits = rates[r].words / rates[r].period;
      $display("nominal %0.0e applied %e measured %e: %0d bits, %0d bit errors, %0d errored words",
               rates[r].ber, applied, measured, bit_count, err_bit_count, err_word_count);
      check(!sync_fail && !pass, $sformatf("run at %0.0e completes and fails", rates[r].ber));
      check(word_count == CNT_W'(rates[r].words), "all words checked");
      check(err_bit_count == CNT_W'(rates[r].nbits) * err_word_count,
            $sformatf("%0d bits per errored word", rates[r].nbits));
      check(longint'(err_word_count) >= expect_hits - 1 && longint'(err_word_count) <= expect_hits + 1,
            $sformatf("errored words %0d, expected %0d", err_word_count, expect_hits));
      check(applied > rates[r].ber * 0.9 && applied < rates[r].ber * 1.1,
            "programmed rate within 10% of nominal");
      check(lock_losses == losses0, "lock kept");
    end
    ber_inj_en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
