// bk_modadd -- modulo 2^N-1 parallel-prefix adder (Brent-Kung, end-around
// carry).
//
// Same three parts as bk_adder, except that the carry fed into the carry
// level is the adder's own carry-out G(N-1:0) (weight 2^N == 1 modulo
// 2^N-1). Because G(N-1:0) comes out of the prefix tree before the carry
// level, there is no combinational loop; the end-around carry costs one
// prefix level, which is the small overhead of a modulo 2^N-1 prefix adder
// over a plain one:
//   c_0 = G(N-1:0),  c_(i+1) = G(i:0) | P(i:0) & G(N-1:0),  s_i = p_i ^ c_i.
// Result: s == (a + b) mod (2^N-1), zero possibly shown as all ones (when
// a + b == 2^N-1). Purely combinational. The end-around-carry prefix scheme
// is this design's own way of making the Brent-Kung adder modular.
module bk_modadd #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
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

  assign c[0] = G[N-1];   // end-around carry
  for (genvar i = 0; i < N; i++) begin : g_sum
    logic unused_ca, unused_cb, unused_sa;
    peres_gate u_eac (
      .a(P[i]), .b(G[N-1]), .c(G[i]), .p(unused_ca), .q(unused_cb), .r(c[i+1])
    );
    feynman_gate u_sum (.a(c[i]), .b(p[i]), .p(unused_sa), .q(s[i]));
  end

  logic unused_c;
  assign unused_c = c[N];
endmodule
