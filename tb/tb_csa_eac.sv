// tb_csa_eac -- checks the modulo 2^N-1 carry-save adder.
// N = 4: all 4096 operand triples; N = 7: 20000 random triples. Expected:
// (sum + carry) mod (2^N-1) == (x + y + z) mod (2^N-1), computed with
// integer arithmetic.
module tb_csa_eac;
  int checks = 0, failures = 0;

  logic [3:0] x4, y4, z4, s4, c4;
  logic [6:0] x7, y7, z7, s7, c7;

  csa_eac #(.N(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(s4), .carry(c4));
  csa_eac #(.N(7)) dut7 (.x(x7), .y(y7), .z(z7), .sum(s7), .carry(c7));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x4, y4, z4} = 12'(v);
      #1;
      checks++;
      if ((int'(s4) + int'(c4)) % 15 != (int'(x4) + int'(y4) + int'(z4)) % 15) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 %0d %0d %0d -> %0d %0d", x4, y4, z4, s4, c4);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      x7 = 7'($urandom); y7 = 7'($urandom); z7 = 7'($urandom);
      #1;
      checks++;
      if ((int'(s7) + int'(c7)) % 127 != (int'(x7) + int'(y7) + int'(z7)) % 127) begin
        failures++;
        if (failures < 10) $display("FAIL N=7 %0d %0d %0d -> %0d %0d", x7, y7, z7, s7, c7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
