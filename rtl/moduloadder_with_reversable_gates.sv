// moduloadder_with_reversable_gates -- RNS adder of two (3N+K)-bit numbers
// built from reversible gates, next to a plain Brent-Kung binary adder.
//
// Data flow (all combinational, no clock):
//   A, B --forward_converter--> (x1, x2, x3), (x01, x02, x03)
//        --rns_channel_adder--> (s1, s2, s3)      residues of A+B
//        --reverse_converter--> Xsum = (A + B) mod M,
//   M = (2^N-1) * 2^(N+K) * (2^N+1).
// In parallel, Nsum = A + B with carry-out from an (3N+K)-bit Brent-Kung
// adder. With the defaults N = K = 4, A and B are 16 bits, the moduli are
// {15, 256, 17} and M = 65280.
// Ports:
//   A, B   [3N+K-1:0]  operands
//   Nsum   [3N+K:0]    plain binary sum
//   Rsum   [3N+K:0]    channel sums packed {s1[N-1:0], s2[N+K-1:0], s3[N:0]};
//                      s1 may show 0 as all ones
//   Xsum   [3N+K-1:0]  RNS sum converted back to binary
// The module name, A, B, Nsum and Rsum with their widths, and N = K = 4 as
// implied by those widths, follow the source design. The packing order of
// Rsum and the Xsum output are this design's own.
module moduloadder_with_reversable_gates #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 4
) (
  input  logic [3*N+K-1:0] A,
  input  logic [3*N+K-1:0] B,
  output logic [3*N+K:0]   Nsum,
  output logic [3*N+K:0]   Rsum,
  output logic [3*N+K-1:0] Xsum
);
  localparam int unsigned W = 3 * N + K;

  logic [N-1:0]   x1, x01, s1;
  logic [N+K-1:0] x2, x02, s2;
  logic [N:0]     x3, x03, s3;

  forward_converter #(.N(N), .K(K)) u_fwd_a (.x(A), .x1(x1),  .x2(x2),  .x3(x3));
  forward_converter #(.N(N), .K(K)) u_fwd_b (.x(B), .x1(x01), .x2(x02), .x3(x03));

  rns_channel_adder #(.N(N), .K(K)) u_chan (
    .a1(x1),  .a2(x2),  .a3(x3),
    .b1(x01), .b2(x02), .b3(x03),
    .s1(s1),  .s2(s2),  .s3(s3)
  );

  reverse_converter #(.N(N), .K(K)) u_rev (.x1(s1), .x2(s2), .x3(s3), .x(Xsum));

  assign Rsum = {s1, s2, s3};

  bk_adder #(.N(W)) u_nsum (
    .a(A), .b(B), .cin(1'b0), .s(Nsum[W-1:0]), .cout(Nsum[W])
  );
endmodule
