// reverse_converter -- RNS to binary for the moduli set
// {2^N-1, 2^(N+K), 2^N+1}.
//
// Let M2 = 2^(2N)-1 = (2^N-1)(2^N+1). The result is X = Y * 2^(N+K) + x2,
// i.e. the concatenation {Y, x2}, where Y = floor(X / 2^(N+K)) < M2.
// Y is found modulo M2 as
//   Y == 2^-(N+K) * (Z - x2),
//   Z == x1 * (2^N+1) * 2^(N-1) + x3 * (2^N-1) * 2^(N-1)   (mod M2),
// Z being the CRT combination of x1 and x3 (2^(N-1) is the inverse of 2
// modulo 2^N-1 and of -2 modulo 2^N+1). Modulo M2 a product with a power
// of two is a rotation of a 2N-bit word and a negation is a bitwise
// complement, so the operand preparation needs wires and inverters only:
//   opA = rotl({x1, x1}, s)                      x1 * (2^N+1)
//   opB = rotl({x3[N-1:0], 0..0, x3[N]}, s)      x3 * 2^N
//   opC = rotl(~zext(x3), s)                     -x3
//   opD = rotl(~zext(x2), r)                     -x2
// with r = -(N+K) mod 2N and s = (N-1+r) mod 2N. Two 2N-bit CSAs with
// end-around carry and a modulo 2^(2N)-1 (Brent-Kung, EAC) adder sum the four
// words. That adder may give zero as all ones; Y < M2, so all ones is
// mapped to 0 before {Y, x2} is formed.
// Purely combinational. Accepts x1 in [0, 2^N-1] (all ones meaning 0),
// x2 any value, x3 in [0, 2^N]. Requires 1 <= K <= N.
// The structure (operand preparation, two 2N-bit EAC CSAs, modulo
// 2^(2N)-1 adder, output Y & x2) follows the source design; the operand
// words, the choice of a Brent-Kung adder and the zero fix are this
// design's own.
module reverse_converter #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0]     x1,
  input  logic [N+K-1:0]   x2,
  input  logic [N:0]       x3,
  output logic [3*N+K-1:0] x
);
  if (K < 1 || K > N) begin : g_bad_k
    $error("reverse_converter: K must be in [1, N]");
  end

  localparam int unsigned W  = 2 * N;
  localparam int unsigned R  = (W - ((N + K) % W)) % W;
  localparam int unsigned S  = (N - 1 + R) % W;

  function automatic logic [W-1:0] rotl(input logic [W-1:0] v, input int unsigned k);
    logic [W-1:0] r;
    for (int unsigned i = 0; i < W; i++) r[(i + k) % W] = v[i];
    return r;
  endfunction

  // ---------------- operand preparation ----------------
  logic [W-1:0] x1x1, x3sh, x3e, x2e;
  logic [W-1:0] op_a, op_b, op_c, op_d;
  always_comb begin
    x1x1 = {x1, x1};
    x3sh = '0;
    x3sh[W-1:N] = x3[N-1:0];
    x3sh[0]     = x3[N];
    x3e  = '0;
    x3e[N:0] = x3;
    x2e  = '0;
    x2e[N+K-1:0] = x2;
    op_a = rotl(x1x1, S);
    op_b = rotl(x3sh, S);
    op_c = rotl(~x3e, S);
    op_d = rotl(~x2e, R);
  end

  // ---------------- modulo 2^(2N)-1 reduction ----------------
  logic [W-1:0] s0, c0, s1, c1, y_raw, y;
  csa_eac #(.N(W)) u_csa0 (.x(op_a), .y(op_b), .z(op_c), .sum(s0), .carry(c0));
  csa_eac #(.N(W)) u_csa1 (.x(s0),   .y(c0),   .z(op_d), .sum(s1), .carry(c1));
  bk_modadd #(.N(W)) u_add (.a(s1), .b(c1), .s(y_raw));

  always_comb begin
    y = (y_raw == '1) ? '0 : y_raw;
    x = {y, x2};
  end
endmodule
