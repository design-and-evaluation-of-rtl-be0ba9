// tb_cla4_hybrid: exhaustive test of the 4-bit hybrid CLA. For all 2^9 values of
// A, B and carry-in it checks the sum and carry-out against integer addition
// and the carry into each bit position against (A + B + cin) of the lower bits.
module tb_cla4_hybrid;
  logic [3:0] a, b, s, c, exp_c;
  logic       cin, cout;
  logic [4:0] exp_sum;
  int checks = 0, failures = 0;

  cla4_hybrid dut (.a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      exp_sum = 5'(a) + 5'(b) + 5'(cin);
      // carry into bit k = bit k of the sum of the lower k bits, i.e. the sum
      // bit k XOR a[k] XOR b[k]
      exp_c = exp_sum[3:0] ^ a ^ b;
      checks++;
      if ({cout, s} !== exp_sum) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> cout=%b s=%h expected %h", a, b, cin, cout, s, exp_sum);
      end
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b carries=%b expected %b", a, b, cin, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
