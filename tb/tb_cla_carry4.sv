// tb_cla_carry4: exhaustive test of the look-ahead carry block. Every one of the
// 2^9 combinations of G[3:0], P[3:0] and C0 is compared with the recursive
// definition C_{i+1} = G_i | P_i & C_i, evaluated one bit at a time.
module tb_cla_carry4;
  logic [3:0] g, p;
  logic       c0;
  logic [4:1] c, exp_c;
  logic       cc;
  int checks = 0, failures = 0;

  cla_carry4 dut (.g(g), .p(p), .c0(c0), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c0, p, g} = 9'(i);
      #1;
      cc = c0;
      for (int k = 0; k < 4; k++) begin
        cc = g[k] | (p[k] & cc);
        exp_c[k+1] = cc;
      end
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL g=%b p=%b c0=%b c=%b expected %b", g, p, c0, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
