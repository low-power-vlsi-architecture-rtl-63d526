// tb_bk_adder -- checks the Brent-Kung binary adder at several widths.
// N = 4 (the 4-bit tree): every a, b, cin. N = 16 (default), 5, 7 and 12
// (incomplete trees): 20000 random vectors each, plus all-ones + 1 carry
// chains. Expected: {cout, s} == a + b + cin by integer arithmetic.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic [4:0]  a5, b5, s5;
  logic [6:0]  a7, b7, s7;
  logic [11:0] a12, b12, s12;
  logic        ci4, ci16, ci5, ci7, ci12, co4, co16, co5, co7, co12;

  bk_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .s(s4),  .cout(co4));
  bk_adder           dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));
  bk_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .s(s5),  .cout(co5));
  bk_adder #(.N(7))  dut7  (.a(a7),  .b(b7),  .cin(ci7),  .s(s7),  .cout(co7));
  bk_adder #(.N(12)) dut12 (.a(a12), .b(b12), .cin(ci12), .s(s12), .cout(co12));

  task automatic check(string tag, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", tag, got, exp);
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
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      check("N=4", longint'({co4, s4}), longint'(a4) + b4 + ci4);
    end
    for (int v = 0; v < 20002; v++) begin
      if (v < 2) begin
        a16 = '1; b16 = 16'(v ^ 1); ci16 = 1'(v);
        a5 = '1;  b5 = 5'(v ^ 1);   ci5 = 1'(v);
        a7 = '1;  b7 = 7'(v ^ 1);   ci7 = 1'(v);
        a12 = '1; b12 = 12'(v ^ 1); ci12 = 1'(v);
      end else begin
        a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
        a5 = 5'($urandom);   b5 = 5'($urandom);   ci5 = 1'($urandom);
        a7 = 7'($urandom);   b7 = 7'($urandom);   ci7 = 1'($urandom);
        a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
      end
      #1;
      check("N=16", longint'({co16, s16}), longint'(a16) + b16 + ci16);
      check("N=5",  longint'({co5, s5}),   longint'(a5) + b5 + ci5);
      check("N=7",  longint'({co7, s7}),   longint'(a7) + b7 + ci7);
      check("N=12", longint'({co12, s12}), longint'(a12) + b12 + ci12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
