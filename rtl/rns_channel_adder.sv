// rns_channel_adder -- the three RNS processing units for addition.
//
// Adds two numbers held as residues of {2^N-1, 2^(N+K), 2^N+1}, each
// channel on its own with no carry between channels:
//   s1 = (a1 + b1) mod (2^N-1)  Brent-Kung modulo 2^N-1 adder (bk_modadd),
//                               zero possibly as all ones;
//   s2 = (a2 + b2) mod 2^(N+K)  Brent-Kung binary adder, carry-out dropped;
//   s3 = (a3 + b3) mod (2^N+1)  modulo 2^N+1 adder, inputs in [0, 2^N].
// Purely combinational. The parallel, carry-free channels follow the source
// design; which adder serves each channel is this design's own choice.
module rns_channel_adder #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0]   a1,
  input  logic [N+K-1:0] a2,
  input  logic [N:0]     a3,
  input  logic [N-1:0]   b1,
  input  logic [N+K-1:0] b2,
  input  logic [N:0]     b3,
  output logic [N-1:0]   s1,
  output logic [N+K-1:0] s2,
  output logic [N:0]     s3
);
  logic unused_cout;

  bk_modadd  #(.N(N))     u_ch1 (.a(a1), .b(b1), .s(s1));
  bk_adder   #(.N(N + K)) u_ch2 (.a(a2), .b(b2), .cin(1'b0), .s(s2), .cout(unused_cout));
  modadd_2n1 #(.N(N))     u_ch3 (.a(a3), .b(b3), .s(s3));
endmodule
