// rca_eac_modadd -- modulo 2^N-1 ripple-carry adder with end-around carry.
//
// Two rows. The first is an N-bit ripple-carry adder of a, b and cin made of
// HNG gates (fourth input 0). Its carry-out has weight 2^N == 1 modulo
// 2^N-1, so it is fed around to the second row, a ripple chain of Peres
// gates used as half adders (third input 0), which adds it to the first
// row's sum. The second row's own carry-out is dropped.
// Result: s == (a + b + cin) mod (2^N-1), where zero may appear as all ones
// (the usual double representation of zero in modulo 2^N-1 arithmetic).
// With cin = 1 and a = b = 2^N-1 (both "zero") the result is 0 instead of 1;
// the converters and channels of this design tie cin to 0.
// Purely combinational; the critical path runs through both rows.
// Cost as built: N HNG + N Peres gates, 2N constant inputs, 3N garbage
// outputs. Structure follows the source design.
module rca_eac_modadd #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s
);
  logic [N:0]   c1;   // first-row carries
  logic [N-1:0] s1;   // first-row sum
  logic [N:0]   c2;   // second-row carries

  assign c1[0] = cin;
  assign c2[0] = c1[N];  // end-around carry

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic unused_hp, unused_hq, unused_pp;
    hng_gate u_fa (
      .a(a[i]), .b(b[i]), .c(c1[i]), .d(1'b0),
      .p(unused_hp), .q(unused_hq), .r(s1[i]), .s(c1[i+1])
    );
    peres_gate u_ha (
      .a(s1[i]), .b(c2[i]), .c(1'b0),
      .p(unused_pp), .q(s[i]), .r(c2[i+1])
    );
  end

  logic unused_c2;
  assign unused_c2 = c2[N];
endmodule
