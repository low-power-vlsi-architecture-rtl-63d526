// csa_eac -- N-bit carry-save adder with end-around carry (EAC).
//
// A modulo 2^N-1 3:2 compressor: N independent full adders, each one HNG
// gate with its fourth input tied to 0, reduce three N-bit operands to a
// sum vector and a carry vector. The carry of bit i has weight 2^(i+1), so
// it is moved to bit i+1; the carry of the top bit has weight 2^N, which is
// 1 modulo 2^N-1, so it wraps around to bit 0. Hence
//   (x + y + z) mod (2^N-1) == (sum + carry) mod (2^N-1)
// exactly, with no correction term. Delay is one full adder, whatever N.
// Purely combinational. Structure (one HNG per bit, carry wrapped) follows
// the source design.
module csa_eac #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  logic [N-1:0] fa_carry;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic unused_p, unused_q;
    hng_gate u_hng (
      .a(x[i]), .b(y[i]), .c(z[i]), .d(1'b0),
      .p(unused_p), .q(unused_q), .r(sum[i]), .s(fa_carry[i])
    );
  end

  // Carries move up one place; the top one wraps to bit 0.
  always_comb carry = {fa_carry[N-2:0], fa_carry[N-1]};
endmodule
