// ber_inject: applies a programmed bit error rate to the transmitted words.
//
// Every PERIOD-th valid word (period input) gets nbits adjacent bits flipped,
// so the applied bit error rate is nbits / (W * period): with W = 64, one bit
// every word is 1.6e-2, six bits every word about 1e-1, and one bit every
// 15 625 000 words 1e-9, covering the 1e-1 to 1e-9 range used in the
// measurements. The flipped field starts at a rotating offset that advances
// by nbits after each hit, so over time every bit position is hit. The
// document applies these error rates with the transceiver tools; a
// deterministic, rate-programmable injector in the fabric is this design's
// way to do the same in the custom path.
//
// Timing: combinational on the data (out = in ^ mask, valid passes through);
// the word counter and offset advance on each clock with in_valid. When en is
// low, words pass unchanged and the counter holds at zero. clear (synchronous)
// and rst_n (asynchronous, active low) restart the count.
module ber_inject #(
  parameter int unsigned W   = 64,
  parameter int unsigned PW  = 32,                  // width of the period
  localparam int unsigned EW = $clog2(W + 1),
  localparam int unsigned OW = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic [PW-1:0] period,    // words per hit, 0 is taken as 1
  input  logic [EW-1:0] nbits,     // bits flipped per hit, 0 disables, >= W flips all
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  output logic [W-1:0]  out_data,
  output logic          hit        // this word carries injected errors
);

  logic [PW-1:0] cnt;
  logic [OW-1:0] offset;
  logic [W-1:0]  field, mask;
  logic [2*W-1:0] dbl;
  logic [OW:0]   offset_sum;

  assign hit = en && in_valid && (nbits != '0) && (cnt + 1'b1 >= period);

  always_comb begin
    field = (nbits >= EW'(W)) ? '1 : ((W'(1) << nbits) - W'(1));
    dbl   = {field, field} << offset;    // upper half: field rotated left
    mask  = hit ? dbl[2*W-1:W] : '0;
    offset_sum = {1'b0, offset} + (OW+1)'(nbits % W);
  end

  assign out_valid = in_valid;
  assign out_data  = in_data ^ mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      offset <= '0;
    end else if (clear || !en) begin
      cnt    <= '0;
      offset <= '0;
    end else if (in_valid) begin
      if (hit) begin
        cnt    <= '0;
        offset <= OW'(offset_sum % W);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
