// prbs_ref_pkg: bit-serial reference model of the PRBS patterns for the
// testbenches. It is a plain Fibonacci shift register advanced one bit at a
// time, written independently of the word-parallel RTL: r[k] holds the bit
// sent k+1 bits ago, the new bit is r[P-1] ^ r[Q-1] for x^P + x^Q + 1, and a
// word collects W new bits with the first one in bit 0.
package prbs_ref_pkg;

  class prbs_ref #(int unsigned W = 64);
    bit [30:0] r;
    int unsigned p, q;

    function new(int unsigned sel);
      set_pattern(sel);
      r = '1;
    endfunction

    function void set_pattern(int unsigned sel);
      case (sel)
        0: begin p = 7;  q = 6;  end
        1: begin p = 9;  q = 5;  end
        2: begin p = 15; q = 14; end
        3: begin p = 23; q = 18; end
        default: begin p = 31; q = 28; end
      endcase
    endfunction

    function void reseed();
      r = '1;
    endfunction

    function bit next_bit();
      bit nb;
      nb = r[p-1] ^ r[q-1];
      r  = {r[29:0], nb};
      return nb;
    endfunction

    function logic [W-1:0] next_word();
      logic [W-1:0] w;
      for (int unsigned i = 0; i < W; i++)
        w[i] = next_bit();
      return w;
    endfunction
  endclass

endpackage
