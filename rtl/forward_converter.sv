// forward_converter -- binary to RNS for the moduli set
// {2^N-1, 2^(N+K), 2^N+1}.
//
// The (3N+K)-bit input X is cut into chunks c0 = X[N-1:0], c1 = X[2N-1:N],
// c2 = X[3N-1:2N] and c3 = X[3N+K-1:3N] (K bits, zero-extended to N).
//   x2 = X mod 2^(N+K) is simply the low N+K bits: no logic.
//   x1 = X mod (2^N-1): 2^N == 1, so X == c0 + c1 + c2 + c3. Two CSAs with
//        end-around carry reduce the four chunks to two vectors and a
//        modulo 2^N-1 ripple-carry adder with EAC adds them. x1 may show
//        zero as all ones.
//   x3 = X mod (2^N+1): 2^N == -1, so X == c0 - c1 + c2 - c3. A negated
//        N-bit chunk is its complement plus 2 (-c == ~c + 2), so
//        X == c0 + ~c1 + c2 + ~c3 + 4. Three CSAs with complemented EAC
//        take these four vectors and one constant; each CEAC stage
//        adds 1 (see csa_ceac), so the constant is 4 - 3 = 1 and the
//        two vectors left are added by a modulo 2^N+1 adder. x3 is in
//        [0, 2^N].
// The operand cutting and the constant form the "operand preparation" stage.
// Purely combinational. Requires 1 <= K <= N so that c3 fits one chunk.
// The adder tree (two EAC CSAs + modulo 2^N-1 adder, three CEAC CSAs +
// modulo 2^N+1 adder, x2 taken straight from X) follows the source design;
// the operand preparation, its constant and the choice of the ripple-carry
// adder for x1 are this design's own.
module forward_converter #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 4
) (
  input  logic [3*N+K-1:0] x,
  output logic [N-1:0]     x1,
  output logic [N+K-1:0]   x2,
  output logic [N:0]       x3
);
  if (K < 1 || K > N) begin : g_bad_k
    $error("forward_converter: K must be in [1, N]");
  end

  localparam logic [N-1:0] CEAC_FIX = N'(1);

  // ---------------- operand preparation ----------------
  logic [N-1:0] c0, c1, c2, c3;
  always_comb begin
    c0 = x[N-1:0];
    c1 = x[2*N-1:N];
    c2 = x[3*N-1:2*N];
    c3 = '0;
    c3[K-1:0] = x[3*N+K-1:3*N];
  end

  // ---------------- channel 2^(N+K) ----------------
  assign x2 = x[N+K-1:0];

  // ---------------- channel 2^N-1 ----------------
  logic [N-1:0] m1_s0, m1_c0, m1_s1, m1_c1;
  csa_eac #(.N(N)) u_eac0 (.x(c0),    .y(c1),    .z(c2), .sum(m1_s0), .carry(m1_c0));
  csa_eac #(.N(N)) u_eac1 (.x(m1_s0), .y(m1_c0), .z(c3), .sum(m1_s1), .carry(m1_c1));
  rca_eac_modadd #(.N(N)) u_add1 (.a(m1_s1), .b(m1_c1), .cin(1'b0), .s(x1));

  // ---------------- channel 2^N+1 ----------------
  logic [N-1:0] m3_s0, m3_c0, m3_s1, m3_c1, m3_s2, m3_c2;
  csa_ceac #(.N(N)) u_ceac0 (.x(c0),    .y(~c1),   .z(c2),       .sum(m3_s0), .carry(m3_c0));
  csa_ceac #(.N(N)) u_ceac1 (.x(m3_s0), .y(m3_c0), .z(~c3),      .sum(m3_s1), .carry(m3_c1));
  csa_ceac #(.N(N)) u_ceac2 (.x(m3_s1), .y(m3_c1), .z(CEAC_FIX), .sum(m3_s2), .carry(m3_c2));
  modadd_2n1 #(.N(N)) u_add3 (.a({1'b0, m3_s2}), .b({1'b0, m3_c2}), .s(x3));
endmodule
