// cla_adder: two-level carry look-ahead adder, the final adder of the hybrid
// multiplier.
//
// Bits are grouped by four. Each group forms its generate G and propagate P.
// The carries into the groups come from a parallel-prefix look-ahead over the
// group G/P pairs (log2 of the group count levels deep), and inside a group
// each bit carry is the expanded look-ahead sum of products of the group's
// bits and its carry-in, so no carry ripples. The document asks for a carry
// look-ahead adder to cut carry propagation delay; the group size and the
// prefix arrangement of the second level are this design's choices.
// Purely combinational; WIDTH need not be a multiple of four.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned GS = 4;                       // group size
  localparam int unsigned NG = (WIDTH + GS - 1) / GS;   // number of groups
  localparam int unsigned PW = NG * GS;                 // padded width

  logic [PW-1:0] g, p, c;      // c[i]: carry into bit i
  logic [NG-1:0] gg, gp;       // group generate / propagate
  logic [NG:0]   gc;           // gc[k]: carry into group k
  logic [NG-1:0] pg, pp;       // prefix generate / propagate of groups 0..k

  always_comb begin
    g = '0;
    p = '0;
    g[WIDTH-1:0] = a & b;
    p[WIDTH-1:0] = a ^ b;

    // Group generate and propagate.
    for (int unsigned k = 0; k < NG; k++) begin
      gp[k] = &p[k*GS +: GS];
      gg[k] = 1'b0;
      for (int unsigned j = 0; j < GS; j++) begin
        logic t;
        t = g[k*GS+j];
        for (int unsigned m = j + 1; m < GS; m++)
          t = t & p[k*GS+m];
        gg[k] = gg[k] | t;
      end
    end

    // Second level: look-ahead across groups as a parallel prefix
    // (Kogge-Stone) over the group (G, P) pairs, log2(NG) steps deep; the
    // carry-in is then merged in through the prefix propagate.
    pg = gg;
    pp = gp;
    for (int unsigned d = 1; d < NG; d = d * 2) begin
      logic [NG-1:0] ng, np;
      ng = pg;
      np = pp;
      for (int unsigned k = d; k < NG; k++) begin
        ng[k] = pg[k] | (pp[k] & pg[k-d]);
        np[k] = pp[k] & pp[k-d];
      end
      pg = ng;
      pp = np;
    end
    gc[0] = cin;
    for (int unsigned k = 1; k <= NG; k++)
      gc[k] = pg[k-1] | (pp[k-1] & cin);

    // First level: carries inside each group.
    for (int unsigned k = 0; k < NG; k++) begin
      for (int unsigned i = 0; i < GS; i++) begin
        logic t, acc;
        acc = 1'b0;
        for (int unsigned j = 0; j < i; j++) begin
          t = g[k*GS+j];
          for (int unsigned m = j + 1; m < i; m++)
            t = t & p[k*GS+m];
          acc = acc | t;
        end
        t = gc[k];
        for (int unsigned m = 0; m < i; m++)
          t = t & p[k*GS+m];
        c[k*GS+i] = acc | t;
      end
    end

    sum  = p[WIDTH-1:0] ^ c[WIDTH-1:0];
    cout = (WIDTH == PW) ? gc[NG] : c[WIDTH];
  end

endmodule
