// wallace_mult: unsigned N x N Wallace tree multiplier, the leaf multiplier of
// the hybrid (Vedic + Wallace) multiplier.
//
// Partial product i is a, gated by b[i], shifted left by i. The rows are
// reduced in layers: within a layer every group of three rows passes through
// a row of full adders (3:2 counters) giving a sum row and a carry row shifted
// by one, and leftover rows pass through. Layers repeat until two rows are
// left (4 rows -> 3 -> 2), which the carry look-ahead adder adds. The
// document names Wallace as one half of its hybrid multiplier but does not
// detail it; this is the textbook word-level form. Purely combinational.
// N >= 2.
module wallace_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned PW = 2 * N;

  // Rows left after one layer of 3:2 reduction.
  function automatic int unsigned rows_after(int unsigned r);
    return (r / 3) * 2 + (r % 3);
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r;
    r = N;
    for (int unsigned i = 0; i < lvl; i++)
      r = rows_after(r);
    return r;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned r, l;
    r = N;
    l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  logic [PW-1:0] pp [0:N-1];
  logic [PW-1:0] last0, last1;   // the two rows left after the last layer

  // Partial products.
  for (genvar i = 0; i < N; i++) begin : g_pp
    assign pp[i] = b[i] ? (PW'(a) << i) : '0;
  end

  // Layer l reads the rows of layer l-1 (or the partial products) and drives
  // its own rows; unused row slots are tied to zero.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int unsigned R  = rows_at(l);
    localparam int unsigned RN = rows_after(R);
    localparam int unsigned NT = R / 3;            // full-adder rows
    logic [PW-1:0] cur [0:N-1];
    logic [PW-1:0] nxt [0:N-1];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_layer[l-1].nxt;
    end
    for (genvar t = 0; t < NT; t++) begin : g_csa
      logic [PW-1:0] x, y, z;
      assign x = cur[3*t];
      assign y = cur[3*t+1];
      assign z = cur[3*t+2];
      assign nxt[2*t]   = x ^ y ^ z;
      assign nxt[2*t+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar k = 0; k < R % 3; k++) begin : g_pass
      assign nxt[2*NT+k] = cur[3*NT+k];
    end
    for (genvar u = RN; u < N; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  if (LAYERS == 0) begin : g_two_rows
    assign last0 = pp[0];
    assign last1 = pp[1];
  end else begin : g_tree_out
    assign last0 = g_layer[LAYERS-1].nxt[0];
    assign last1 = g_layer[LAYERS-1].nxt[1];
  end

  logic cout_unused;

  cla_adder #(.WIDTH(PW)) u_final (
    .a    (last0),
    .b    (last1),
    .cin  (1'b0),
    .sum  (p),
    .cout (cout_unused)
  );

  initial begin
    assert (N >= 2) else $error("wallace_mult: N must be at least 2");
  end

endmodule
