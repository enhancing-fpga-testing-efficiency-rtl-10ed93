// ber_counter: bit error rate accumulators.
//
// Counts, while the checker is locked, the bits compared (W per checked word),
// the bit errors and the errored words. The bit error rate is
// err_bit_count / bit_count; the division is left to the reader of the
// counters (software), as the document reports BER next to the bit and error
// counts. Counters saturate at all ones instead of wrapping. CNT_W = 48 holds
// about 2.8e14 bits, some 6 hours at 12.5 Gb/s; the width is this design's
// choice.
//
// en gates counting: the run controller holds the counters still once a run
// is done, so they keep that run's result (see bist_ctrl).
//
// Timing: counters update on the clock after chk_valid. clear (synchronous)
// and rst_n (asynchronous, active low) zero them; clear wins over a count.
module ber_counter #(
  parameter int unsigned W     = 64,
  parameter int unsigned CNT_W = 48,
  localparam int unsigned EW = $clog2(W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             chk_valid,
  input  logic             word_err,
  input  logic [EW-1:0]    err_bits,
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_bit_count,
  output logic [CNT_W-1:0] word_count,
  output logic [CNT_W-1:0] err_word_count
);

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a,
                                               logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count      <= '0;
      err_bit_count  <= '0;
      word_count     <= '0;
      err_word_count <= '0;
    end else if (clear) begin
      bit_count      <= '0;
      err_bit_count  <= '0;
      word_count     <= '0;
      err_word_count <= '0;
    end else if (en && chk_valid) begin
      bit_count      <= sat_add(bit_count, CNT_W'(W));
      err_bit_count  <= sat_add(err_bit_count, CNT_W'(err_bits));
      word_count     <= sat_add(word_count, CNT_W'(1));
      err_word_count <= sat_add(err_word_count, CNT_W'(word_err));
    end
  end

endmodule
