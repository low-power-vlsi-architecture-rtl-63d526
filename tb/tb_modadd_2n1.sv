// tb_modadd_2n1 -- checks the modulo 2^N+1 adder: every pair of residues
// in [0, 2^N] for N = 4 (default) and N = 8. Expected (a + b) mod (2^N+1)
// by integer arithmetic, exact (single representation).
module tb_modadd_2n1;
  int checks = 0, failures = 0;

  logic [4:0] a4, b4, s4;
  logic [8:0] a8, b8, s8;

  modadd_2n1          dut4 (.a(a4), .b(b4), .s(s4));
  modadd_2n1 #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    for (int i = 0; i <= 16; i++)
      for (int j = 0; j <= 16; j++) begin
        a4 = 5'(i); b4 = 5'(j); #1;
        checks++;
        if (int'(s4) != (i + j) % 17) begin
          failures++;
          $display("FAIL N=4 %0d+%0d -> %0d", i, j, s4);
        end
      end
    for (int i = 0; i <= 256; i++)
      for (int j = 0; j <= 256; j++) begin
        a8 = 9'(i); b8 = 9'(j); #1;
        checks++;
        if (int'(s8) != (i + j) % 257) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 %0d+%0d -> %0d", i, j, s8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
