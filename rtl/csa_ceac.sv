// csa_ceac -- N-bit carry-save adder with complemented end-around carry.
//
// A modulo 2^N+1 3:2 compressor. It is the EAC compressor with one change:
// the carry leaving the top bit (weight 2^N, which is -1 modulo 2^N+1) is
// inverted before it re-enters at bit 0, by a Feynman gate with its second
// input tied to 1. Since -c == (1 - c) - 1, the outputs satisfy
//   (sum + carry) mod (2^N+1) == (x + y + z + 1) mod (2^N+1)
// so every CEAC stage adds a constant 1 that the user of the compressor
// must take off again (the forward converter folds it into one constant
// operand). Purely combinational, one full adder of delay.
// The inverted end-around carry follows the source design; the gate used for
// the inversion and the +1 bookkeeping are this design's own working.
module csa_ceac #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  logic [N-1:0] fa_carry;
  logic         top_carry_n;
  logic         unused_copy;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic unused_p, unused_q;
    hng_gate u_hng (
      .a(x[i]), .b(y[i]), .c(z[i]), .d(1'b0),
      .p(unused_p), .q(unused_q), .r(sum[i]), .s(fa_carry[i])
    );
  end

  // Feynman gate with B = 1 complements the end-around carry.
  feynman_gate u_not (
    .a(fa_carry[N-1]), .b(1'b1), .p(unused_copy), .q(top_carry_n)
  );

  always_comb carry = {fa_carry[N-2:0], top_carry_n};
endmodule
