// tb_csa_ceac -- checks the modulo 2^N+1 carry-save adder with
// complemented end-around carry.
// N = 4: all 4096 triples; N = 6: 20000 random triples. Expected:
// (sum + carry - 1) mod (2^N+1) == (x + y + z) mod (2^N+1).
module tb_csa_ceac;
  int checks = 0, failures = 0;

  logic [3:0] x4, y4, z4, s4, c4;
  logic [5:0] x6, y6, z6, s6, c6;

  csa_ceac #(.N(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(s4), .carry(c4));
  csa_ceac #(.N(6)) dut6 (.x(x6), .y(y6), .z(z6), .sum(s6), .carry(c6));

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
      if ((int'(s4) + int'(c4) - 1 + 17) % 17 != (int'(x4) + int'(y4) + int'(z4)) % 17) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 %0d %0d %0d -> %0d %0d", x4, y4, z4, s4, c4);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      x6 = 6'($urandom); y6 = 6'($urandom); z6 = 6'($urandom);
      #1;
      checks++;
      if ((int'(s6) + int'(c6) - 1 + 65) % 65 != (int'(x6) + int'(y6) + int'(z6)) % 65) begin
        failures++;
        if (failures < 10) $display("FAIL N=6 %0d %0d %0d -> %0d %0d", x6, y6, z6, s6, c6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
