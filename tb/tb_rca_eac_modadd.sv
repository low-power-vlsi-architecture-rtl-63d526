// tb_rca_eac_modadd -- checks the modulo 2^N-1 ripple-carry adder with
// end-around carry.
// N = 4: every a, b, cin; N = 9: 20000 random vectors. Expected value
// (a + b + cin) mod (2^N-1) by integer arithmetic; the result may also be
// all ones when that value is 0. The one known exception, a = b = 2^N-1
// with cin = 1, is skipped. Counts how often the end-around carry fired.
module tb_rca_eac_modadd;
  int checks = 0, failures = 0, eac_seen = 0;

  logic [3:0] a4, b4, s4;
  logic [8:0] a9, b9, s9;
  logic       cin4, cin9;

  rca_eac_modadd #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4));
  rca_eac_modadd #(.N(9)) dut9 (.a(a9), .b(b9), .cin(cin9), .s(s9));

  function automatic bit mod_ok(int r, int v, int m);
    return (r == v % m) || (r == m && v % m == 0);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cin9 = 1'b0; a9 = '0; b9 = '0;
    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      if (cin4 && a4 == 4'hf && b4 == 4'hf) continue;
      #1;
      checks++;
      if (int'(a4) + int'(b4) + int'(cin4) >= 16) eac_seen++;
      if (!mod_ok(int'(s4), int'(a4) + int'(b4) + int'(cin4), 15)) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 %0d+%0d+%0d -> %0d", a4, b4, cin4, s4);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); cin9 = 1'($urandom);
      if (cin9 && a9 == '1 && b9 == '1) continue;
      #1;
      checks++;
      if (!mod_ok(int'(s9), int'(a9) + int'(b9) + int'(cin9), 511)) begin
        failures++;
        if (failures < 10) $display("FAIL N=9 %0d+%0d+%0d -> %0d", a9, b9, cin9, s9);
      end
    end
    checks++;
    if (eac_seen == 0) failures++;
    $display("end-around carry used in %0d vectors", eac_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
