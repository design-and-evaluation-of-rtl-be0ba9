// tb_hybrid_and: exhaustive test of the hybrid AND (generate) cell against the
// truth table G = 1 only for A = B = 1.
module tb_hybrid_and;
  logic a, b, g;
  int checks = 0, failures = 0;
  // expected G for inputs {a, b} = 00, 01, 10, 11
  localparam logic [3:0] G_TABLE = 4'b1000;

  hybrid_and dut (.a(a), .b(b), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (g !== G_TABLE[i]) begin
        failures++;
        $display("FAIL a=%b b=%b g=%b expected %b", a, b, g, G_TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
