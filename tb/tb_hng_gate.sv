// tb_hng_gate -- exhaustive check of the HNG gate.
// All 16 input combinations are applied. Expected values: P, Q pass A, B;
// R is the parity of A, B, C; S ^ D is the majority of A, B, C (full-adder
// carry). Also checks that the gate is a bijection (16 distinct outputs).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  hng_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (p !== a || q !== b || r !== (a ^ b ^ c) ||
          (s ^ d) !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL HNG is not reversible: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
