// tb_bk_modadd -- checks the modulo 2^N-1 Brent-Kung adder.
// Every a, b for N = 4 (default), 5, 7 and 8. Expected:
// (a + b) mod (2^N-1) by integer arithmetic; all ones is accepted for 0.
// Counts how often the end-around carry (a + b >= 2^N) was needed.
module tb_bk_modadd;
  int checks = 0, failures = 0, eac_seen = 0;

  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic [6:0] a7, b7, s7;
  logic [7:0] a8, b8, s8;

  bk_modadd          dut4 (.a(a4), .b(b4), .s(s4));
  bk_modadd #(.N(5)) dut5 (.a(a5), .b(b5), .s(s5));
  bk_modadd #(.N(7)) dut7 (.a(a7), .b(b7), .s(s7));
  bk_modadd #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));

  task automatic check(string tag, int r, int v, int m);
    checks++;
    if (!((r == v % m) || (r == m && v % m == 0))) begin
      failures++;
      if (failures < 10) $display("FAIL %s sum %0d gave %0d", tag, v, r);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = '0; b5 = '0; a7 = '0; b7 = '0; a8 = '0; b8 = '0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v); #1;
      if (int'(a4) + int'(b4) >= 16) eac_seen++;
      check("N=4", int'(s4), int'(a4) + int'(b4), 15);
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v); #1;
      check("N=5", int'(s5), int'(a5) + int'(b5), 31);
    end
    for (int v = 0; v < 16384; v++) begin
      {a7, b7} = 14'(v); #1;
      check("N=7", int'(s7), int'(a7) + int'(b7), 127);
    end
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v); #1;
      check("N=8", int'(s8), int'(a8) + int'(b8), 255);
    end
    checks++;
    if (eac_seen == 0) failures++;
    $display("end-around carry needed in %0d of the N=4 vectors", eac_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
