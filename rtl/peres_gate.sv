// peres_gate -- 3x3 reversible Peres gate.
//
// Outputs: P = A, Q = A ^ B, R = AB ^ C. With C = 0 it is a half adder
// (Q = sum, R = carry). Because R = AB ^ C, it also forms an OR of AB and
// C whenever the two can never be 1 together; the prefix cells of the
// Brent-Kung adders use it that way for G = g_hi | p_hi g_lo. Purely
// combinational, no clock. Gate equations follow the source design; the
// use in prefix cells is this design's own.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
