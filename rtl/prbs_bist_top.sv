// prbs_bist_top: PRBS-based built-in self-test of a serial link and of a
// hybrid (Vedic + Wallace) multiplier that processes the received data.
//
// Transmit side: prbs_gen sends W-bit words of a run-time selectable PRBS
// pattern, or the user's data, to tx_data (towards a serial transceiver, which
// is outside this module), optionally with an injected bit error; ber_inject
// can add errors at a programmed bit error rate on the way out.
// Receive side: loopback_near selects the transmit words directly (near-end
// loopback inside the fabric) or rx_data from the transceiver (external /
// far-end loopback). The received word is operand A of hybrid_mult. In
// MUL_BIST mode operand B is the fixed value 2^mul_shift, so the product
// shifted back by mul_shift must reproduce the PRBS: the PRBS checker thus
// receives the output of the multiplier under test and compares it with the
// expected sequence, testing link and multiplier together. In MUL_USER mode B
// is mul_operand and the product is the user's result (product/product_valid).
// The checker's word and bit errors feed ber_counter, and bist_ctrl runs a
// test of test_words words and reports done/pass.
//
// What follows the document: the generator - DUT - checker chain, the
// run-time pattern and user-data multiplexer, the hybrid multiplier on the
// received data, error and bit error counts, synchronization detection and a
// control unit, and applying bit error rates for test. This design's choices:
// word width 64, the power-of-two fixed operand and its shift, the loopback
// select placement, error injection in the fabric (single errors and a
// deterministic rate), and all handshakes (valid strobes, no back-pressure).
// inj_hit (a word carried injected errors) is kept for debug probing only.
//
// Timing: tx_data is registered (1 cycle after tx_en); the multiplier adds
// one cycle; checker results appear one cycle later and counters one more.
// All resets are asynchronous, active-low rst_n.
module prbs_bist_top
  import prbs_pkg::*;
#(
  parameter int unsigned W            = 64,
  parameter int unsigned CNT_W        = 48,
  parameter int unsigned SYNC_WORDS   = 4,
  parameter int unsigned LOSS_WORDS   = 4,
  parameter int unsigned SYNC_TIMEOUT = 1024,
  parameter int unsigned MUL_BASE     = 4,
  localparam int unsigned SW = $clog2(W),
  localparam int unsigned EW = $clog2(W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // run-time control
  input  logic             start,
  input  logic [CNT_W-1:0] test_words,
  input  prbs_sel_e        pattern_sel,
  input  src_sel_e         src_sel,
  input  logic [W-1:0]     user_data,
  input  logic             tx_en,
  input  logic             inject_err,
  input  logic             ber_inj_en,      // apply a bit error rate
  input  logic [31:0]      ber_inj_period,  // words per injection
  input  logic [EW-1:0]    ber_inj_bits,    // bits flipped per injection
  input  logic             loopback_near,
  input  mul_mode_e        mul_mode,
  input  logic [SW-1:0]    mul_shift,
  input  logic [W-1:0]     mul_operand,
  // transceiver side
  output logic [W-1:0]     tx_data,
  output logic             tx_valid,
  input  logic [W-1:0]     rx_data,
  input  logic             rx_valid,
  // multiplier result
  output logic [2*W-1:0]   product,
  output logic             product_valid,
  // checker status and BER counters
  output logic             locked,
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_bit_count,
  output logic [CNT_W-1:0] word_count,
  output logic [CNT_W-1:0] err_word_count,
  // test result
  output logic             busy,
  output logic             done,
  output logic             pass,
  output logic             sync_fail
);

  logic           restart, cnt_clear, cnt_en;
  logic [W-1:0]   gen_data;
  logic           gen_valid;
  logic           inj_hit;
  logic [W-1:0]   rx_word;
  logic           rx_word_valid;
  logic [W-1:0]   mul_b;
  logic [W-1:0]   chk_data;
  logic           chk_valid, word_err, lock_lost;
  logic [EW-1:0]  err_bits;

  // ---------------------------------------------------------------- transmit
  prbs_gen #(.W(W)) u_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (tx_en),
    .restart    (restart),
    .sel        (pattern_sel),
    .src        (src_sel),
    .user_data  (user_data),
    .inject_err (inject_err),
    .out_data   (gen_data),
    .out_valid  (gen_valid)
  );

  ber_inject #(.W(W)) u_inj (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (restart),
    .en        (ber_inj_en),
    .period    (ber_inj_period),
    .nbits     (ber_inj_bits),
    .in_valid  (gen_valid),
    .in_data   (gen_data),
    .out_valid (tx_valid),
    .out_data  (tx_data),
    .hit       (inj_hit)
  );

  // ------------------------------------------------------------ loopback
  assign rx_word       = loopback_near ? tx_data  : rx_data;
  assign rx_word_valid = loopback_near ? tx_valid : rx_valid;

  // ---------------------------------------------------- multiplier under test
  assign mul_b = (mul_mode == MUL_USER) ? mul_operand : (W'(1) << mul_shift);

  hybrid_mult #(.N(W), .BASE(MUL_BASE)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rx_word_valid),
    .a         (rx_word),
    .b         (mul_b),
    .out_valid (product_valid),
    .p         (product)
  );

  // The checker sees the product with the fixed operand's shift undone.
  assign chk_data = (mul_mode == MUL_USER) ? product[W-1:0] : product[{1'b0, mul_shift} +: W];

  // ----------------------------------------------------------------- check
  prbs_checker #(.W(W), .SYNC_WORDS(SYNC_WORDS), .LOSS_WORDS(LOSS_WORDS)) u_chk (
    .clk       (clk),
    .rst_n     (rst_n),
    .restart   (restart),
    .sel       (pattern_sel),
    .in_valid  (product_valid),
    .in_data   (chk_data),
    .locked    (locked),
    .chk_valid (chk_valid),
    .word_err  (word_err),
    .err_bits  (err_bits),
    .lock_lost (lock_lost)
  );

  ber_counter #(.W(W), .CNT_W(CNT_W)) u_ber (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (cnt_clear),
    .en             (cnt_en),
    .chk_valid      (chk_valid),
    .word_err       (word_err),
    .err_bits       (err_bits),
    .bit_count      (bit_count),
    .err_bit_count  (err_bit_count),
    .word_count     (word_count),
    .err_word_count (err_word_count)
  );

  bist_ctrl #(.CNT_W(CNT_W), .SYNC_TIMEOUT(SYNC_TIMEOUT)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .test_words     (test_words),
    .locked         (locked),
    .lock_lost      (lock_lost),
    .chk_valid      (chk_valid),
    .word_err       (word_err),
    .err_word_count (err_word_count),
    .restart        (restart),
    .cnt_clear      (cnt_clear),
    .cnt_en         (cnt_en),
    .busy           (busy),
    .done           (done),
    .pass           (pass),
    .sync_fail      (sync_fail)
  );

endmodule
