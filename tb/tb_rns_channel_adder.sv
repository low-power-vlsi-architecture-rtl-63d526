// tb_rns_channel_adder -- checks the three RNS addition channels at the
// defaults (moduli 15, 256, 17): every pair in the 15 and 17 channels,
// with random 256-channel operands, plus all ones in the 15 channel.
// Expected sums by integer arithmetic.
module tb_rns_channel_adder;
  int checks = 0, failures = 0;

  logic [3:0] a1, b1, s1;
  logic [7:0] a2, b2, s2;
  logic [4:0] a3, b3, s3;

  rns_channel_adder dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int u = 0; u <= 16; u++)
          for (int w = 0; w <= 16; w++) begin
            int e1;
            a1 = 4'(i); b1 = 4'(j); a3 = 5'(u); b3 = 5'(w);
            a2 = 8'($urandom); b2 = 8'($urandom); #1;
            e1 = (i + j) % 15;
            checks++;
            if (!(int'(s1) == e1 || (s1 == 4'hf && e1 == 0)) ||
                int'(s2) != (int'(a2) + int'(b2)) % 256 ||
                int'(s3) != (u + w) % 17) begin
              failures++;
              if (failures < 10)
                $display("FAIL (%0d,%0d,%0d)+(%0d,%0d,%0d) -> (%0d,%0d,%0d)",
                         a1, a2, a3, b1, b2, b3, s1, s2, s3);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
