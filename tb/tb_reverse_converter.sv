// tb_reverse_converter -- checks residue-to-binary conversion.
// Defaults (N = K = 4, M = 15*256*17 = 65280): for every X in [0, M-1] the
// residues are formed by integer arithmetic and fed in; the output must be
// X. Where X mod 15 == 0 the residue is given a second time as 15 (all
// ones), the other form of zero modulo 2^N-1. N = 5, K = 3
// (M = 31*256*33): 30000 random X.
module tb_reverse_converter;
  int checks = 0, failures = 0, zero_fix = 0;

  logic [3:0]  a1;
  logic [7:0]  a2;
  logic [4:0]  a3;
  logic [15:0] ax;
  logic [4:0]  b1;
  logic [7:0]  b2;
  logic [5:0]  b3;
  logic [17:0] bx;

  reverse_converter                 dut_a (.x1(a1), .x2(a2), .x3(a3), .x(ax));
  reverse_converter #(.N(5), .K(3)) dut_b (.x1(b1), .x2(b2), .x3(b3), .x(bx));

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s expected %0d got %0d", tag, exp, got);
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
    b1 = '0; b2 = '0; b3 = '0;
    for (int x = 0; x < 65280; x++) begin
      a1 = 4'(x % 15); a2 = 8'(x % 256); a3 = 5'(x % 17); #1;
      if (dut_a.y_raw == '1) zero_fix++;
      check("N=4,K=4", int'(ax), x);
      if (x % 15 == 0) begin
        a1 = 4'd15; #1;
        check("N=4,K=4 x1=15", int'(ax), x);
      end
    end
    for (int v = 0; v < 30000; v++) begin
      int x;
      x = int'($urandom % (31 * 256 * 33));
      b1 = 5'(x % 31); b2 = 8'(x % 256); b3 = 6'(x % 33); #1;
      check("N=5,K=3", int'(bx), x);
    end
    $display("all-ones result mapped to zero %0d times", zero_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
