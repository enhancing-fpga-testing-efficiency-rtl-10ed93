// prbs_pkg: types and constants shared by the PRBS BIST blocks.
//
// The pattern set PRBS-7/9/15/23/31 and their feedback polynomials are the
// usual serial-link test patterns (ITU-T O.150 style, the same set the
// transceiver's hard PRBS offers); the document names PRBS-7 and PRBS-31 and a
// run-time pattern-length multiplexer, the remaining lengths are this design's
// choice. All patterns are produced non-inverted.
//
// Bit order: a W-bit word carries W consecutive sequence bits, bit 0 first in
// time. The generator/checker state is the last 31 sequence bits, oldest in
// bit 0 and newest in bit 30; every supported pattern is a function of that
// state, so one state register serves all pattern lengths.
package prbs_pkg;

  // Run-time pattern selection (the "pattern length" multiplexer select).
  typedef enum logic [2:0] {
    PRBS7  = 3'd0,   // x^7  + x^6  + 1
    PRBS9  = 3'd1,   // x^9  + x^5  + 1
    PRBS15 = 3'd2,   // x^15 + x^14 + 1
    PRBS23 = 3'd3,   // x^23 + x^18 + 1
    PRBS31 = 3'd4    // x^31 + x^28 + 1
  } prbs_sel_e;

  // Transmit data source multiplexer.
  typedef enum logic {
    SRC_PRBS = 1'b0,
    SRC_USER = 1'b1
  } src_sel_e;

  // Operand B of the multiplier under test: in MUL_BIST it is the fixed
  // value 2^k and the checker sees the product shifted back by k; in MUL_USER
  // it is the user's operand.
  typedef enum logic {
    MUL_BIST = 1'b0,
    MUL_USER = 1'b1
  } mul_mode_e;

  // Length of the state shared by all patterns (the longest register).
  localparam int unsigned STATE_W = 31;

  // Default seed: all ones is a valid non-zero state for every pattern.
  localparam logic [STATE_W-1:0] SEED_DEFAULT = '1;

  // Feedback taps: s[n] = s[n-P] ^ s[n-Q] for the polynomial x^P + x^Q + 1.
  function automatic int unsigned tap_p(prbs_sel_e sel);
    case (sel)
      PRBS7:   return 7;
      PRBS9:   return 9;
      PRBS15:  return 15;
      PRBS23:  return 23;
      default: return 31;
    endcase
  endfunction

  function automatic int unsigned tap_q(prbs_sel_e sel);
    case (sel)
      PRBS7:   return 6;
      PRBS9:   return 5;
      PRBS15:  return 14;
      PRBS23:  return 18;
      default: return 28;
    endcase
  endfunction

  // Sequence period 2^P - 1 for the selected pattern (informational).
  function automatic longint unsigned prbs_period(prbs_sel_e sel);
    return (64'd1 << tap_p(sel)) - 64'd1;
  endfunction

endpackage
