// tb_hybrid_xor: exhaustive test of the hybrid XOR (propagate) cell against the
// truth table P = 1 for A != B.
module tb_hybrid_xor;
  logic a, b, p;
  int checks = 0, failures = 0;
  // expected P for inputs {a, b} = 00, 01, 10, 11
  localparam logic [3:0] P_TABLE = 4'b0110;

  hybrid_xor dut (.a(a), .b(b), .p(p));

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
      if (p !== P_TABLE[i]) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b expected %b", a, b, p, P_TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
