// feynman_gate -- 2x2 reversible Feynman (controlled-NOT) gate.
//
// Outputs: P = A, Q = A ^ B. With B = 0 it copies A (reversible logic has
// no fan-out), with B = 1 it gives the complement of A, otherwise it is an
// XOR. Purely combinational, no clock. Gate equations follow the source
// design.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
