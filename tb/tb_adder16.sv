// tb_adder16: test of the 16-bit adder made of four chained 4-bit CLAs.
// Directed cases push a carry across every block boundary (C4, C8, C12, C16),
// then random operands are checked against integer addition, including the
// per-bit carry vector.
module tb_adder16;
  logic [15:0] a, b, s, c, exp_c;
  logic        cin, cout;
  logic [16:0] exp_sum;
  int checks = 0, failures = 0;

  adder16 dut (.a(a), .b(b), .cin(cin), .s(s), .c(c), .cout(cout));

  task automatic check();
    #1;
    exp_sum = 17'(a) + 17'(b) + 17'(cin);
    exp_c   = exp_sum[15:0] ^ a ^ b;
    checks++;
    if ({cout, s} !== exp_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %h", a, b, cin, cout, s, exp_sum);
    end
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b carries=%h expected %h", a, b, cin, c, exp_c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full propagate chain: all-ones plus carry-in ripples through all blocks
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; check();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check();
    a = 16'h0000; b = 16'h0000; cin = 1'b0; check();
    // a generate at the top of each block, propagated through the next ones
    for (int k = 0; k < 4; k++) begin
      a = 16'hFFFF << (4*k + 3);
      b = 16'h0001 << (4*k + 3);
      cin = 1'b0;
      check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
