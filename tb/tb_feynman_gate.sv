// tb_feynman_gate -- exhaustive check of the Feynman (CNOT) gate: copy
// with B = 0, complement with B = 1, and reversibility.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (b ? !a : a)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL Feynman is not reversible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
