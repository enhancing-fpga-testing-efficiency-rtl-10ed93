// hybrid_mult: registered N x N unsigned hybrid multiplier (device under test
// of the BIST).
//
// The product comes from vedic_mult, a recursive Vedic multiplier with
// Wallace tree leaves and carry look-ahead adders, built from LUT logic so
// that no DSP slice is needed. The document uses it to multiply the high
// speed received data. One register stage at the output: in_valid with
// operands a and b on one clock gives out_valid and p on the next (latency 1,
// one product per clock). The register stage and the unsigned operands are
// this design's choice. rst_n (asynchronous, active low) clears out_valid
// and p.
module hybrid_mult #(
  parameter int unsigned N    = 64,
  parameter int unsigned BASE = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  logic [2*N-1:0] prod;

  vedic_mult #(.N(N), .BASE(BASE)) u_vedic (.a(a), .b(b), .p(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        p <= prod;
    end
  end

endmodule
