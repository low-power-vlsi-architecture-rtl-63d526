// hng_gate -- 4x4 reversible HNG ("hybrid new gate").
//
// Outputs: P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D.
// With D tied to 0, R is the sum and S the carry of a full adder of A, B
// and C; every full adder in this design is one HNG used that way, and P
// and Q are then garbage outputs. The mapping is a bijection on 4 bits.
// Purely combinational, no clock. The gate equations follow the source
// design; nothing here is an own choice.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;

  always_comb begin
    axb = a ^ b;
    p   = a;
    q   = b;
    r   = axb ^ c;
    s   = (axb & c) ^ (a & b) ^ d;
  end
endmodule
