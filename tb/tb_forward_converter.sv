// tb_forward_converter -- checks binary-to-residue conversion.
// Defaults (N = K = 4, 16-bit X): every X in [0, 65535]. N = 5, K = 2
// (17-bit X): 30000 random X plus all ones. Expected residues by integer
// arithmetic: x1 == X mod (2^N-1) (all ones accepted for 0),
// x2 == X mod 2^(N+K), x3 == X mod (2^N+1).
module tb_forward_converter;
  int checks = 0, failures = 0;

  logic [15:0] xa;
  logic [3:0]  a1;
  logic [7:0]  a2;
  logic [4:0]  a3;
  logic [16:0] xb;
  logic [4:0]  b1;
  logic [6:0]  b2;
  logic [5:0]  b3;

  forward_converter                  dut_a (.x(xa), .x1(a1), .x2(a2), .x3(a3));
  forward_converter #(.N(5), .K(2))  dut_b (.x(xb), .x1(b1), .x2(b2), .x3(b3));

  task automatic check(string tag, int x, int r1, int r2, int r3, int m1, int m2, int m3);
    checks++;
    if (!((r1 == x % m1) || (r1 == m1 && x % m1 == 0)) || r2 != x % m2 || r3 != x % m3) begin
      failures++;
      if (failures < 10) $display("FAIL %s X=%0d -> %0d %0d %0d", tag, x, r1, r2, r3);
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
    xb = '0;
    for (int v = 0; v < 65536; v++) begin
      xa = 16'(v); #1;
      check("N=4,K=4", v, int'(a1), int'(a2), int'(a3), 15, 256, 17);
    end
    for (int v = 0; v < 30001; v++) begin
      xb = (v == 0) ? '1 : 17'($urandom); #1;
      check("N=5,K=2", int'(xb), int'(b1), int'(b2), int'(b3), 31, 128, 33);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
