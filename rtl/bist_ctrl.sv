// bist_ctrl: control logic unit of the PRBS BIST.
//
// Sequences one self-test run and judges it:
//   IDLE    - waits for start.
//   RESTART - one cycle: reseeds the generator, returns the checker to
//             synchronization hunt and clears the BER counters.
//   SYNC    - waits for the checker to lock. If it does not lock within
//             SYNC_TIMEOUT cycles the run ends with sync_fail.
//   RUN     - counts checked words until test_words have been compared. A
//             loss of lock during the run is remembered as a failure.
//   DONE    - done stays high until the next start; pass is high when the
//             checker locked, never lost lock and counted no errored word.
// cnt_en lets the BER counters count in IDLE (free-running tester) and RUN,
// and freezes them in DONE so a run's counts can be read after it ends.
// The document names a control logic unit that manages initiation, execution
// and control of the tests; the states, the timeout and the pass rule are this
// design's choices. Timing: start is sampled in IDLE and DONE; restart/clear
// are one-cycle pulses in the cycle after start. rst_n is asynchronous,
// active low.
module bist_ctrl #(
  parameter int unsigned CNT_W        = 48,
  parameter int unsigned SYNC_TIMEOUT = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] test_words,      // words to check in RUN
  input  logic             locked,          // from the checker
  input  logic             lock_lost,       // from the checker
  input  logic             chk_valid,       // from the checker
  input  logic             word_err,        // from the checker
  input  logic [CNT_W-1:0] err_word_count,  // from the BER counters
  output logic             restart,         // to generator and checker
  output logic             cnt_clear,       // to the BER counters
  output logic             cnt_en,          // to the BER counters
  output logic             busy,
  output logic             done,
  output logic             pass,
  output logic             sync_fail
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_RESTART = 3'd1,
    S_SYNC    = 3'd2,
    S_RUN     = 3'd3,
    S_DONE    = 3'd4
  } ctrl_state_e;

  localparam int unsigned TW = $clog2(SYNC_TIMEOUT + 1);

  ctrl_state_e      st;
  logic [TW-1:0]    wait_cnt;
  logic [CNT_W-1:0] words;
  logic             lost;
  logic [CNT_W-1:0] words_nx;
  logic             lost_nx;

  assign words_nx = words + CNT_W'(chk_valid);
  assign lost_nx  = lost | lock_lost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      wait_cnt  <= '0;
      words     <= '0;
      lost      <= 1'b0;
      pass      <= 1'b0;
      sync_fail <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE, S_DONE: begin
          if (start) begin
            st        <= S_RESTART;
            pass      <= 1'b0;
            sync_fail <= 1'b0;
          end
        end
        S_RESTART: begin
          st       <= S_SYNC;
          wait_cnt <= '0;
          words    <= '0;
          lost     <= 1'b0;
        end
        S_SYNC: begin
          if (locked) begin
            st <= S_RUN;
          end else if (wait_cnt == TW'(SYNC_TIMEOUT - 1)) begin
            st        <= S_DONE;
            sync_fail <= 1'b1;
            pass      <= 1'b0;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_RUN: begin
          words    <= words_nx;
          lost     <= lost_nx;
          if (words_nx >= test_words) begin
            st   <= S_DONE;
            // The counters lag the checker by a cycle: include this word's result.
            pass <= !lost_nx && (err_word_count == '0) && !(chk_valid && word_err);
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign restart   = (st == S_RESTART);
  assign cnt_clear = (st == S_RESTART);
  assign busy      = (st == S_RESTART) || (st == S_SYNC) || (st == S_RUN);
  assign done      = (st == S_DONE);
  // Counters run freely in IDLE (a plain bit error rate tester), count the
  // words of a run in RUN, and hold a finished run's result in DONE.
  assign cnt_en    = (st == S_IDLE) || (st == S_RUN);

endmodule
