// tb_ber_counter: self-checking test of ber_counter. A default instance
// (W = 64, 48-bit counters) is driven with random checked words and error
// counts and compared with a model; clear and the count enable are
// exercised; a second instance
// with 10-bit counters shows that the counters saturate instead of wrapping.
module tb_ber_counter;
  localparam int unsigned W  = 64;
  localparam int unsigned EW = $clog2(W + 1);

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b1;
  logic          chk_valid = 1'b0, word_err = 1'b0;
  logic [EW-1:0] err_bits = '0;
  logic [47:0]   bit_count, err_bit_count, word_count, err_word_count;
  logic [9:0]    s_bits, s_ebits, s_words, s_ewords;

  int checks = 0, failures = 0;

  ber_counter dut (.*);
  ber_counter #(.W(W), .CNT_W(10)) u_small (
    .clk, .rst_n, .clear, .en, .chk_valid, .word_err, .err_bits,
    .bit_count(s_bits), .err_bit_count(s_ebits),
    .word_count(s_words), .err_word_count(s_ewords));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
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
    longint m_bits, m_ebits, m_words, m_ewords;
    m_bits = 0; m_ebits = 0; m_words = 0; m_ewords = 0;
    repeat (2) @(negedge clk);
    check(bit_count == 0 && err_word_count == 0, "reset");
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit v, e;
      int k;
      v = ($urandom_range(0, 3) != 0);
      e = ($urandom_range(0, 4) == 0);
      k = e ? $urandom_range(1, W) : 0;
      chk_valid = v; word_err = e; err_bits = EW'(k);
      if (n == 1500) clear = 1'b1;
      en = !(n >= 2000 && n < 2200);   // counting held for a while
      @(negedge clk);
      if (clear) begin
        m_bits = 0; m_ebits = 0; m_words = 0; m_ewords = 0;
        clear = 1'b0;
      end else if (v && en) begin
        m_bits += W; m_ebits += k; m_words++; m_ewords += e;
      end
      check(bit_count == 48'(m_bits) && err_bit_count == 48'(m_ebits) &&
            word_count == 48'(m_words) && err_word_count == 48'(m_ewords),
            $sformatf("counts at %0d: %0d/%0d %0d/%0d", n, bit_count, m_bits, err_bit_count, m_ebits));
    end
    // The 10-bit instance has long since saturated on bits and error bits.
    check(s_bits == '1, "bit counter saturates");
    check(s_ebits == '1, "error bit counter saturates");
    chk_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
