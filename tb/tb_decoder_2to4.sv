// tb_decoder_2to4: exhaustive self-check of the syndrome decoder.
// For each {EDP2, EDP1} the output must have a single high bit, at the index
// equal to the syndrome value.
module tb_decoder_2to4;

  logic       edp1, edp2;
  logic [3:0] o;
  int checks = 0, failures = 0;

  decoder_2to4 dut (.edp1(edp1), .edp2(edp2), .o(o));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      edp2 = s[1];
      edp1 = s[0];
      #10;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (o[k] !== (k == s)) begin
          failures++;
          $display("FAIL syndrome %0d: O%0d=%b", s, k, o[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
