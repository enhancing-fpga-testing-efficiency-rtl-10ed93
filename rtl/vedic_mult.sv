// vedic_mult: Vedic (Urdhva-Tiryakbhyam, "vertically and crosswise")
// multiplier whose leaf multipliers are Wallace trees.
//
// The Vedic method splits each operand into halves H and L and forms the four
// half-width products LL, HL, LH and HH in parallel, applying the same split to
// each of them down to BASE bits. Here that recursion is unrolled level by
// level: level 0 multiplies every BASE-bit digit of a by every digit of b with
// a wallace_mult; each following level combines four products of the level
// below into one of twice the width. In a combine step LL and HH do not overlap,
// so {HH, LL} is one row; with the two cross products shifted by half a digit
// that makes three rows, which one layer of full adders reduces to two and a
// carry look-ahead adder adds. This is the hybrid of Vedic and Wallace
// multipliers with a carry look-ahead adder that the document proposes; the
// leaf size (BASE = 4) and the 3:2 combining step are this design's choices.
// Purely combinational. N must be BASE times a power of two.
module vedic_mult #(
  parameter int unsigned N    = 8,
  parameter int unsigned BASE = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  function automatic int unsigned num_levels();
    int unsigned s, l;
    s = BASE;
    l = 0;
    while (s < N) begin
      s = s * 2;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();   // combine levels
  localparam int unsigned D0     = N / BASE;       // digits per operand at level 0

  // Level 0: all digit-by-digit products, index i*D0 + j for a digit i, b digit j.
  logic [2*BASE-1:0] leaf [0:D0*D0-1];

  for (genvar i = 0; i < D0; i++) begin : g_ai
    for (genvar j = 0; j < D0; j++) begin : g_bj
      wallace_mult #(.N(BASE)) u_leaf (
        .a (a[i*BASE +: BASE]),
        .b (b[j*BASE +: BASE]),
        .p (leaf[i*D0+j])
      );
    end
  end

  // Level k (1..LEVELS): digits of S = BASE*2^k bits, D = N/S per operand.
  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned S  = BASE << k;     // digit width at this level
    localparam int unsigned H  = S / 2;         // digit width one level down
    localparam int unsigned D  = N / S;
    localparam int unsigned DL = 2 * D;         // digits per operand one level down
    localparam int unsigned PW = 2 * S;

    logic [PW-1:0] prod [0:D*D-1];
    logic [S-1:0]  below [0:DL*DL-1];           // products of the level below

    if (k == 1) begin : g_from_leaf
      assign below = leaf;
    end else begin : g_from_lvl
      assign below = g_lvl[k-1].prod;
    end

    for (genvar i = 0; i < D; i++) begin : g_ai
      for (genvar j = 0; j < D; j++) begin : g_bj
        logic [S-1:0]  p_ll, p_hl, p_lh, p_hh;
        logic [PW-1:0] r0, r1, r2, s, c;
        logic          cout_unused;
        assign p_ll = below[(2*i)  *DL + 2*j];
        assign p_hl = below[(2*i+1)*DL + 2*j];
        assign p_lh = below[(2*i)  *DL + 2*j+1];
        assign p_hh = below[(2*i+1)*DL + 2*j+1];
        assign r0 = {p_hh, p_ll};
        assign r1 = PW'(p_hl) << H;
        assign r2 = PW'(p_lh) << H;
        assign s  = r0 ^ r1 ^ r2;
        assign c  = ((r0 & r1) | (r0 & r2) | (r1 & r2)) << 1;
        cla_adder #(.WIDTH(PW)) u_add (
          .a    (s),
          .b    (c),
          .cin  (1'b0),
          .sum  (prod[i*D+j]),
          .cout (cout_unused)
        );
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign p = leaf[0];
  end else begin : g_top
    assign p = g_lvl[LEVELS].prod[0];
  end

  initial begin
    assert (N >= BASE && BASE >= 2 && (BASE << LEVELS) == N)
      else $error("vedic_mult: N must be BASE times a power of two");
  end

endmodule
