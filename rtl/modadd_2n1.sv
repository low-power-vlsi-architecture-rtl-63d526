// modadd_2n1 -- modulo 2^N+1 adder.
//
// Adds two residues a, b in [0, 2^N] (N+1 bits each) and returns
// (a + b) mod (2^N+1) in [0, 2^N]. Since a + b <= 2^(N+1) < 2(2^N+1), one
// conditional subtraction of the modulus is enough: the (N+2)-bit sum and
// the sum minus 2^N+1 are both formed and the latter is chosen when it does
// not go negative. Inputs above 2^N are outside the contract.
// Purely combinational. Only the function of this adder is fixed by the
// source design; the add-and-select structure is this design's own, the
// simplest that does the job.
module modadd_2n1 #(
  parameter int unsigned N = 4
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s
);
  localparam logic [N+1:0] MOD = (N + 2)'((1 << N) + 1);

  logic [N+1:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    s   = (sum >= MOD) ? (N + 1)'(sum - MOD) : sum[N:0];
  end
endmodule
