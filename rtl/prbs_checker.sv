// prbs_checker: PRBS receiver check with synchronization detection, a
// reference sequence and an error detection unit.
//
// The document's checker predicts the next word from the received one ("next
// seed") and compares it with the incoming word, counting errored words and
// errored bits, after a synchronization detection step. This implementation:
//   HUNT   - every valid word seeds the reference state (self-synchronising:
//            the last 31 received bits are the seed). The next word is
//            predicted with prbs_step and compared. SYNC_WORDS consecutive
//            matches (all-zero words never count, since zero is a fixed point
//            of the recurrence) declare lock.
//   LOCKED - the reference state runs on by itself and is no longer reloaded
//            from the line, so a single flipped bit counts exactly once.
//            Each valid word is compared: chk_valid pulses, word_err flags a
//            mismatch and err_bits gives the number of differing bits.
//            LOSS_WORDS consecutive errored words drop back to HUNT
//            (lock_lost pulses).
// SYNC_WORDS, LOSS_WORDS and the self-seeding scheme are this design's
// choices; the document does not give them.
//
// Timing: results are registered, one cycle after the word is presented.
// restart (or rst_n, active-low asynchronous) returns to HUNT.
module prbs_checker
  import prbs_pkg::*;
#(
  parameter int unsigned W          = 64,
  parameter int unsigned SYNC_WORDS = 4,
  parameter int unsigned LOSS_WORDS = 4,
  localparam int unsigned EW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  prbs_sel_e     sel,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  output logic          locked,
  output logic          chk_valid,   // a word was checked while locked
  output logic          word_err,    // ... and it was wrong
  output logic [EW-1:0] err_bits,    // ... number of wrong bits in it
  output logic          lock_lost    // pulse: lock dropped to HUNT
);

  typedef enum logic {HUNT = 1'b0, LOCKED = 1'b1} chk_state_e;

  localparam int unsigned SCW = $clog2(SYNC_WORDS + 1);
  localparam int unsigned LCW = $clog2(LOSS_WORDS + 1);

  chk_state_e         st;
  logic [STATE_W-1:0] ref_state;     // reference PRBS state
  logic               seeded;        // ref_state holds a received seed
  logic [SCW-1:0]     match_cnt;
  logic [LCW-1:0]     err_run;

  logic [W-1:0]       exp_word;
  logic [STATE_W-1:0] ref_next;
  logic [W-1:0]       diff;
  logic [EW-1:0]      diff_cnt;
  logic [STATE_W-1:0] rx_seed;

  prbs_step #(.W(W)) u_ref (
    .state      (ref_state),
    .sel        (sel),
    .word       (exp_word),
    .next_state (ref_next)
  );

  // Last 31 received bits as a seed; for W < 31 older bits come from ref_state.
  always_comb begin
    logic [STATE_W+W-1:0] cat;
    cat     = {in_data, ref_state};
    rx_seed = cat[STATE_W+W-1:W];
  end

  always_comb begin
    diff     = in_data ^ exp_word;
    diff_cnt = '0;
    for (int unsigned i = 0; i < W; i++)
      diff_cnt = diff_cnt + EW'(diff[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= HUNT;
      ref_state <= '0;
      seeded    <= 1'b0;
      match_cnt <= '0;
      err_run   <= '0;
      chk_valid <= 1'b0;
      word_err  <= 1'b0;
      err_bits  <= '0;
      lock_lost <= 1'b0;
    end else begin
      chk_valid <= 1'b0;
      word_err  <= 1'b0;
      err_bits  <= '0;
      lock_lost <= 1'b0;
      if (restart) begin
        st        <= HUNT;
        seeded    <= 1'b0;
        match_cnt <= '0;
        err_run   <= '0;
      end else if (in_valid) begin
        unique case (st)
          HUNT: begin
            ref_state <= rx_seed;
            seeded    <= 1'b1;
            if (seeded && diff == '0 && in_data != '0) begin
              if (match_cnt == SCW'(SYNC_WORDS - 1)) begin
                st        <= LOCKED;
                match_cnt <= '0;
                err_run   <= '0;
              end else begin
                match_cnt <= match_cnt + 1'b1;
              end
            end else begin
              match_cnt <= '0;
            end
          end
          LOCKED: begin
            ref_state <= ref_next;
            chk_valid <= 1'b1;
            word_err  <= (diff != '0);
            err_bits  <= diff_cnt;
            if (diff != '0) begin
              if (err_run == LCW'(LOSS_WORDS - 1)) begin
                st        <= HUNT;
                seeded    <= 1'b0;
                err_run   <= '0;
                lock_lost <= 1'b1;
              end else begin
                err_run <= err_run + 1'b1;
              end
            end else begin
              err_run <= '0;
            end
          end
          default: st <= HUNT;
        endcase
      end
    end
  end

  assign locked = (st == LOCKED);

  initial begin
    assert (SYNC_WORDS >= 1 && LOSS_WORDS >= 1)
      else $error("prbs_checker: SYNC_WORDS and LOSS_WORDS must be at least 1");
  end

endmodule
