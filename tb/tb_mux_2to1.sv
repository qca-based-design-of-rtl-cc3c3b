// tb_mux_2to1: exhaustive self-check of the 2-to-1 multiplexer.
module tb_mux_2to1;

  logic in0, in1, sel, y;
  int checks = 0, failures = 0;

  mux_2to1 dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_y;
    for (int i = 0; i < 8; i++) begin
      {sel, in1, in0} = 3'(i);
      #10;
      if (sel) exp_y = in1;
      else     exp_y = in0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%b in1=%b in0=%b: y=%b", sel, in1, in0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
