// prbs_step: combinational W-bit advance of the PRBS recurrence.
//
// This is the "series-parallel" core of the generator and of the checker's
// reference sequence: the serial recurrence s[n] = s[n-P] ^ s[n-Q] is unrolled
// W times so that one clock produces W sequence bits. Starting from the last
// 31 sequence bits (state, oldest in bit 0) it returns the next W bits (word,
// bit 0 first in time) and the state after them. Each pattern length has its
// own XOR network with constant taps; the run-time select picks one of them
// (the pattern multiplexer). Purely combinational, no clock.
module prbs_step
  import prbs_pkg::*;
#(
  parameter int unsigned W = 64          // bits per clock (word width)
) (
  input  logic [STATE_W-1:0] state,      // last 31 sequence bits, oldest in bit 0
  input  prbs_sel_e          sel,        // pattern length
  output logic [W-1:0]       word,       // next W sequence bits, bit 0 first
  output logic [STATE_W-1:0] next_state  // last 31 bits after this word
);

  localparam int unsigned EXT = STATE_W + W;

  // Extended sequence: the 31 known bits followed by the W new ones.
  function automatic logic [EXT-1:0] extend(logic [STATE_W-1:0] st,
                                            int unsigned p, int unsigned q);
    logic [EXT-1:0] e;
    e = '0;
    e[STATE_W-1:0] = st;
    for (int unsigned n = STATE_W; n < EXT; n++)
      e[n] = e[n-p] ^ e[n-q];
    return e;
  endfunction

  logic [EXT-1:0] ext7, ext9, ext15, ext23, ext31, ext_sel;

  always_comb begin
    ext7  = extend(state, 7, 6);
    ext9  = extend(state, 9, 5);
    ext15 = extend(state, 15, 14);
    ext23 = extend(state, 23, 18);
    ext31 = extend(state, 31, 28);
    case (sel)
      PRBS7:   ext_sel = ext7;
      PRBS9:   ext_sel = ext9;
      PRBS15:  ext_sel = ext15;
      PRBS23:  ext_sel = ext23;
      default: ext_sel = ext31;
    endcase
  end

  assign word       = ext_sel[EXT-1:STATE_W];
  assign next_state = ext_sel[EXT-1:W];

endmodule
