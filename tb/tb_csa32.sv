// tb_csa32: end-to-end test of the 32-bit carry select adder at its default
// size. Directed and random operands are checked against 33-bit integer
// addition. The test also counts how often each mechanism of the adder was
// exercised and fails if one never was:
//   - the lower half's carry C16 = 0, selecting the upper sum computed with
//     carry-in 0, and C16 = 1, selecting the one computed with carry-in 1;
//   - an upper half that propagates on every bit, so that the two candidate
//     carry-outs differ and C32 itself is decided by the carry-out mux;
//   - a carry crossing every 4-bit CLA boundary inside a 16-bit adder;
//   - a carry-out C32 of 1, and a carry travelling from bit 0 to C32.
module tb_csa32;
  logic [31:0] a, b, sum;
  logic        cin, cout;
  logic [32:0] exp_sum;
  logic [16:0] lo;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_sel_matters = 0, n_cout = 0, n_full_chain = 0;
  int n_block_carry[8];

  csa32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [32:0] carries;
    #1;
    exp_sum = 33'(a) + 33'(b) + 33'(cin);
    lo      = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
    carries = {1'b0, exp_sum[31:0] ^ a ^ b};  // carry into each bit
    carries[32] = exp_sum[32];
    checks++;
    if ({cout, sum} !== exp_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %h", a, b, cin, cout, sum, exp_sum);
    end
    if (lo[16]) n_sel1++; else n_sel0++;
    // the upper half propagates all the way: the two candidate carry-outs differ
    if ((a[31:16] ^ b[31:16]) == 16'hFFFF) n_sel_matters++;
    if (exp_sum[32]) n_cout++;
    if (&carries[32:1]) n_full_chain++;
    for (int k = 0; k < 8; k++) if (carries[4*k + 4]) n_block_carry[k]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_block_carry[k]) n_block_carry[k] = 0;
    // corners
    a = 32'h0000_0000; b = 32'h0000_0000; cin = 1'b0; check();
    a = 32'hFFFF_FFFF; b = 32'h0000_0000; cin = 1'b1; check();  // carry bit 0 -> C32
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; cin = 1'b1; check();
    a = 32'h0000_FFFF; b = 32'h0000_0001; cin = 1'b0; check();  // C16 = 1 only
    a = 32'hFFFF_0000; b = 32'h0001_0000; cin = 1'b0; check();  // C32 from upper only
    a = 32'h8000_0000; b = 32'h8000_0000; cin = 1'b0; check();
    a = 32'h7FFF_FFFF; b = 32'h0000_0001; cin = 1'b0; check();
    // random
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      // now and then force long carry chains
      if (n % 7 == 0) b = ~a ^ (32'($urandom) & 32'h0000_000F);
      check();
    end
    // every mechanism must have happened
    if (n_sel0 == 0)        begin failures++; $display("FAIL never selected carry-in 0 half"); end
    if (n_sel1 == 0)        begin failures++; $display("FAIL never selected carry-in 1 half"); end
    if (n_sel_matters == 0) begin failures++; $display("FAIL candidate carry-outs never differed"); end
    if (n_cout == 0)        begin failures++; $display("FAIL carry-out never 1"); end
    if (n_full_chain == 0)  begin failures++; $display("FAIL no full-length carry chain"); end
    foreach (n_block_carry[k])
      if (n_block_carry[k] == 0) begin
        failures++; $display("FAIL no carry out of CLA block %0d", k);
      end
    $display("select C16=0: %0d, C16=1: %0d, candidate carry-outs differ: %0d, C32=1: %0d, full chain: %0d",
             n_sel0, n_sel1, n_sel_matters, n_cout, n_full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
