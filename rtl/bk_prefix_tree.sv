// bk_prefix_tree -- Brent-Kung parallel-prefix carry network.
//
// Given per-bit generate g[i] = a_i & b_i and propagate p[i] = a_i ^ b_i,
// it returns for every i the group signals of bits [i:0]:
//   G[i] = G(i:0), P[i] = P(i:0).
// The network is the Brent-Kung one: an up-sweep of log2(N) levels forms
// the groups ending at bit 2^(l+1)k-1, then a down-sweep of log2(N)-1
// levels fills in the remaining positions, for about 2N prefix cells in
// 2log2(N)-1 levels. For N = 4 this is exactly the 4-bit tree of the source
// design: (3:2) and (1:0), then (3:0) and (2:0). Any N >= 2 is accepted.
//
// Each prefix cell (gh,ph) o (gl,pl) is two Peres gates:
//   G = gh | ph&gl = (ph & gl) ^ gh   -- the two terms are never both 1,
//                                        since a group that propagates
//                                        cannot also generate,
//   P = ph & pl    = (ph & pl) ^ 0.
// Building the cells from Peres gates is this design's own choice.
// Purely combinational.
module bk_prefix_tree #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] G,
  output logic [N-1:0] P
);
  localparam int unsigned L      = (N < 2) ? 1 : $clog2(N);
  localparam int unsigned STAGES = 2 * L - 1;

  // Stage k holds the (G,P) of every column after k prefix levels.
  logic [N-1:0] gs [STAGES+1];
  logic [N-1:0] ps [STAGES+1];

  assign gs[0] = g;
  assign ps[0] = p;

  // Up-sweep: level l combines column i with column i-2^l when i+1 is a
  // multiple of 2^(l+1).
  for (genvar l = 0; l < L; l++) begin : g_up
    for (genvar i = 0; i < N; i++) begin : g_col
      if (((i + 1) % (2 ** (l + 1))) == 0) begin : g_cell
        logic unused_a, unused_b, unused_c, unused_d;
        peres_gate u_g (
          .a(ps[l][i]), .b(gs[l][i-(2**l)]), .c(gs[l][i]),
          .p(unused_a), .q(unused_b), .r(gs[l+1][i])
        );
        peres_gate u_p (
          .a(ps[l][i]), .b(ps[l][i-(2**l)]), .c(1'b0),
          .p(unused_c), .q(unused_d), .r(ps[l+1][i])
        );
      end else begin : g_wire
        assign gs[l+1][i] = gs[l][i];
        assign ps[l+1][i] = ps[l][i];
      end
    end
  end

  // Down-sweep: level l (from L-2 down to 0) combines column
  // i = 3*2^l-1 + m*2^(l+1) with column i-2^l, which is already complete.
  for (genvar d = 0; d < L - 1; d++) begin : g_down
    localparam int unsigned LV = L - 2 - d;   // tree level handled here
    localparam int unsigned SI = L + d;       // input stage index
    for (genvar i = 0; i < N; i++) begin : g_col
      if ((i >= 3 * (2 ** LV) - 1) &&
          (((i + 1 - (2 ** LV)) % (2 ** (LV + 1))) == 0)) begin : g_cell
        logic unused_a, unused_b, unused_c, unused_d;
        peres_gate u_g (
          .a(ps[SI][i]), .b(gs[SI][i-(2**LV)]), .c(gs[SI][i]),
          .p(unused_a), .q(unused_b), .r(gs[SI+1][i])
        );
        peres_gate u_p (
          .a(ps[SI][i]), .b(ps[SI][i-(2**LV)]), .c(1'b0),
          .p(unused_c), .q(unused_d), .r(ps[SI+1][i])
        );
      end else begin : g_wire
        assign gs[SI+1][i] = gs[SI][i];
        assign ps[SI+1][i] = ps[SI][i];
      end
    end
  end

  assign G = gs[STAGES];
  assign P = ps[STAGES];
endmodule
