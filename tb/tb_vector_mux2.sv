// tb_vector_mux2: random and walking-one test of the 16-bit 2:1 vector mux at
// its default width; every bit must follow the shared select.
module tb_vector_mux2;
  localparam int unsigned W = 16;
  logic [W-1:0] in0, in1, y, exp_y;
  logic sel;
  int checks = 0, failures = 0;

  vector_mux2 dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  task automatic check();
    #1;
    exp_y = sel ? in1 : in0;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL sel=%b in1=%h in0=%h y=%h expected %h", sel, in1, in0, y, exp_y);
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
    // walking one on each side, the other side all zero / all one
    for (int i = 0; i < W; i++) begin
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        in0 = W'(1) << i;  in1 = ~(W'(1) << i);  check();
        in1 = W'(1) << i;  in0 = ~(W'(1) << i);  check();
      end
    end
    for (int n = 0; n < 500; n++) begin
      in0 = W'($urandom);
      in1 = W'($urandom);
      sel = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
