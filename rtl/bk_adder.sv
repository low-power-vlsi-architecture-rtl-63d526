// bk_adder -- N-bit Brent-Kung parallel-prefix binary adder.
//
// Three parts, as in any prefix adder:
//   1. bit level: a Peres gate per bit (third input 0) gives
//      p_i = a_i ^ b_i and g_i = a_i & b_i;
//   2. the Brent-Kung prefix tree (bk_prefix_tree) gives G(i:0), P(i:0);
//   3. one carry level folds in the carry-in, c_(i+1) = G(i:0) | P(i:0)&cin
//      (a Peres gate again, the two terms being exclusive), and a Feynman
//      gate per bit forms s_i = p_i ^ c_i.
// cout = c_N. Purely combinational; the depth is 2log2(N)-1 prefix levels
// plus the carry level. The Brent-Kung tree follows the source design; the
// gate mapping and the carry-in level are this design's own.
module bk_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] g, p, G, P;
  logic [N:0]   c;

  for (genvar i = 0; i < N; i++) begin : g_pg
    logic unused_pa;
    peres_gate u_pg (
      .a(a[i]), .b(b[i]), .c(1'b0), .p(unused_pa), .q(p[i]), .r(g[i])
    );
  end

  bk_prefix_tree #(.N(N)) u_tree (.g(g), .p(p), .G(G), .P(P));

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_sum
    logic unused_ca, unused_cb, unused_sa;
    peres_gate u_cin (
      .a(P[i]), .b(cin), .c(G[i]), .p(unused_ca), .q(unused_cb), .r(c[i+1])
    );
    feynman_gate u_sum (.a(c[i]), .b(p[i]), .p(unused_sa), .q(s[i]));
  end

  assign cout = c[N];
endmodule
