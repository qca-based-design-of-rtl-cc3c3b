// tb_hamming31_hcg: self-check of the Hamming (3,1) code generator.
// Drives D1 with the 0,1,0,1 pattern of the published encoder waveform and
// checks that both parity bits follow D1 (even parity over positions {1,3}
// and {2,3}), with the parity computed here from the position sets.
module tb_hamming31_hcg;

  logic d1, p1, p2;
  logic [3:1] word;
  int checks = 0, failures = 0;

  hamming31_hcg dut (.d1(d1), .p1(p1), .p2(p2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      d1 = i[0];
      #10;
      word = {d1, p2, p1};
      checks++;
      if ((word[1] ^ word[3]) !== 1'b0) begin
        failures++;
        $display("FAIL d1=%b: parity over positions 1,3 is odd (p1=%b)", d1, p1);
      end
      checks++;
      if ((word[2] ^ word[3]) !== 1'b0) begin
        failures++;
        $display("FAIL d1=%b: parity over positions 2,3 is odd (p2=%b)", d1, p2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
