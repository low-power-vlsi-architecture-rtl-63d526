// tb_moduloadder_with_reversable_gates -- end-to-end test of the RNS adder
// at its default size (N = K = 4: 16-bit operands, moduli {15, 256, 17},
// M = 65280), no parameter overridden.
//
// Operands: the three pairs of the published waveform (25+35, 123+234,
// 123+100, whose plain sums are 60, 357 and 223), corner cases, then
// 300000 random pairs. For each pair it checks, against integer arithmetic:
//   Nsum == A + B,
//   Rsum == {(a+b) mod 15, (a+b) mod 256, (a+b) mod 17} (all ones accepted
//           for 0 in the mod-15 field),
//   Xsum == (A + B) mod 65280.
// It also counts how often each mechanism fired and fails if one never
// did: end-around carry in the forward converter's ripple adder, end-around
// carry in the mod-15 channel, wrap in the mod-256 channel, reduction in
// the mod-17 channel, the all-ones zero in the mod-15 channel, the
// reverse converter's all-ones-to-zero fix, sums beyond the RNS range M,
// and carry-out of the plain adder.
module tb_moduloadder_with_reversable_gates;
  localparam int M = 15 * 256 * 17;

  int checks = 0, failures = 0;
  int n_fwd_eac = 0, n_ch1_eac = 0, n_ch2_wrap = 0, n_ch3_red = 0;
  int n_ch1_ones = 0, n_rev_fix = 0, n_range = 0, n_ncarry = 0;

  logic [15:0] A, B, Xsum;
  logic [16:0] Nsum, Rsum;

  moduloadder_with_reversable_gates dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b);
    int s, e1;
    A = 16'(a); B = 16'(b);
    #1;
    s  = a + b;
    e1 = s % 15;
    checks++;
    if (int'(Nsum) != s) begin
      failures++;
      if (failures < 10) $display("FAIL Nsum %0d+%0d = %0d", a, b, Nsum);
    end
    checks++;
    if (!(int'(Rsum[16:13]) == e1 || (Rsum[16:13] == 4'hf && e1 == 0)) ||
        int'(Rsum[12:5]) != s % 256 || int'(Rsum[4:0]) != s % 17) begin
      failures++;
      if (failures < 10) $display("FAIL Rsum %0d+%0d = %h", a, b, Rsum);
    end
    checks++;
    if (int'(Xsum) != s % M) begin
      failures++;
      if (failures < 10) $display("FAIL Xsum %0d+%0d = %0d", a, b, Xsum);
    end
    // mechanism counters
    if (dut.u_fwd_a.u_add1.c1[4] || dut.u_fwd_b.u_add1.c1[4]) n_fwd_eac++;
    if (dut.u_chan.u_ch1.G[3])                               n_ch1_eac++;
    if (int'(dut.x2) + int'(dut.x02) >= 256)                 n_ch2_wrap++;
    if (int'(dut.x3) + int'(dut.x03) >= 17)                  n_ch3_red++;
    if (Rsum[16:13] == 4'hf)                                 n_ch1_ones++;
    if (dut.u_rev.y_raw == '1)                               n_rev_fix++;
    if (s >= M)                                              n_range++;
    if (Nsum[16])                                            n_ncarry++;
  endtask

  task automatic need(string what, int n);
    $display("%-34s %0d", what, n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    // published waveform operands
    apply(25, 35);
    checks++; if (Nsum != 17'd60)  failures++;
    apply(123, 234);
    checks++; if (Nsum != 17'd357) failures++;
    apply(123, 100);
    checks++; if (Nsum != 17'd223) failures++;
    // corners
    apply(0, 0);
    apply(65535, 65535);
    apply(65279, 1);
    apply(65280, 0);
    apply(14, 1);
    apply(15, 0);
    for (int i = 0; i < 300000; i++) apply(int'($urandom & 16'hffff), int'($urandom & 16'hffff));

    need("forward mod-15 end-around carry", n_fwd_eac);
    need("channel mod-15 end-around carry", n_ch1_eac);
    need("channel mod-256 wrap", n_ch2_wrap);
    need("channel mod-17 reduction", n_ch3_red);
    need("channel mod-15 zero as all ones", n_ch1_ones);
    need("reverse all-ones-to-zero fix", n_rev_fix);
    need("sum beyond RNS range M", n_range);
    need("plain adder carry-out", n_ncarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
