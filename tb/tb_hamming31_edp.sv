// tb_hamming31_edp: exhaustive self-check of the error detector.
// Sweeps all eight (D1, P1, P2) inputs, as in the published detector
// waveform, and checks EDP1, EDP2 and the two garbage outputs (copies of D1).
// The expected EDP bits come from counting ones over each check set.
module tb_hamming31_edp;
  import hamming31_pkg::*;

  codeword_t  code;
  logic       edp1, edp2;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  hamming31_edp dut (.code(code), .edp1(edp1), .edp2(edp2), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e1, e2;
    for (int i = 0; i < 8; i++) begin
      code = codeword_t'(i);
      #10;
      // A check fails when its set {1,3} or {2,3} holds an odd number of ones.
      e1 = (int'(code.p1) + int'(code.d1)) % 2 == 1;
      e2 = (int'(code.p2) + int'(code.d1)) % 2 == 1;
      checks++;
      if (edp1 !== e1 || edp2 !== e2) begin
        failures++;
        $display("FAIL d1=%b p2=%b p1=%b: edp2,edp1=%b%b expected %b%b",
                 code.d1, code.p2, code.p1, edp2, edp1, e2, e1);
      end
      checks++;
      if (garbage !== {2{code.d1}}) begin
        failures++;
        $display("FAIL d1=%b: garbage=%b", code.d1, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
