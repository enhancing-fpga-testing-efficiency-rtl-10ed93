// prbs_gen: PRBS pattern generator with run-time pattern select and a data
// source multiplexer.
//
// A 31-bit state register holds the last sequence bits; prbs_step unrolls
// the serial recurrence so that each enabled clock emits W bits (series-
// parallel generation). The pattern length (PRBS-7/9/15/23/31) is chosen at run
// time, and a second multiplexer selects either the PRBS word or the user's
// data for transmission, as the document describes. inject_err flips bit 0 of
// the next word sent, giving a controlled single-bit error for testing the
// checker; this mirrors the "inject" control of the transceiver's hard PRBS
// and is this design's addition to the custom generator.
//
// Timing: output registered. When en is high on a clock edge, out_data/out_valid
// show the next word one cycle later; with en low out_valid drops and the
// sequence holds. restart reloads SEED (one-cycle pulse, takes priority over en,
// no word is emitted in that cycle). Changing sel takes effect at the next word.
// Reset: active-low asynchronous rst_n loads SEED.
module prbs_gen
  import prbs_pkg::*;
#(
  parameter int unsigned        W    = 64,
  parameter logic [STATE_W-1:0] SEED = SEED_DEFAULT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // produce one word this cycle
  input  logic          restart,     // reload the seed
  input  prbs_sel_e     sel,         // pattern length
  input  src_sel_e      src,         // PRBS or user data
  input  logic [W-1:0]  user_data,   // user data, sent when src == SRC_USER
  input  logic          inject_err,  // flip bit 0 of the next word sent
  output logic [W-1:0]  out_data,
  output logic          out_valid
);

  logic [STATE_W-1:0] state;
  logic [W-1:0]       prbs_word;
  logic [STATE_W-1:0] state_nx;
  logic [W-1:0]       tx_word;
  logic               inject_pend;   // an injection waits for the next word

  prbs_step #(.W(W)) u_step (
    .state      (state),
    .sel        (sel),
    .word       (prbs_word),
    .next_state (state_nx)
  );

  always_comb begin
    tx_word = (src == SRC_USER) ? user_data : prbs_word;
    if (inject_err || inject_pend)
      tx_word[0] = ~tx_word[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= SEED;
      out_data    <= '0;
      out_valid   <= 1'b0;
      inject_pend <= 1'b0;
    end else if (restart) begin
      state       <= SEED;
      out_valid   <= 1'b0;
      inject_pend <= 1'b0;
    end else if (en) begin
      // The PRBS runs on while user data is sent, so the pattern resumes
      // in sequence when switching back.
      state       <= state_nx;
      out_data    <= tx_word;
      out_valid   <= 1'b1;
      inject_pend <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      inject_pend <= inject_pend | inject_err;
    end
  end

endmodule
