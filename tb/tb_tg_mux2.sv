// tb_tg_mux2: exhaustive test of the transmission-gate 2:1 mux
// (sel = 1 selects in1, sel = 0 selects in0).
module tb_tg_mux2;
  logic in0, in1, sel, y, exp_y;
  int checks = 0, failures = 0;

  tg_mux2 dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, in1, in0} = 3'(i);
      #1;
      exp_y = (i >= 4) ? in1 : in0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b in1=%b in0=%b y=%b expected %b", sel, in1, in0, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
