// tb_hamming31_corrector: exhaustive self-check of the error corrector.
// Drives all 32 combinations of EDP1, EDP2, P1, P2, D1, as in the published
// corrector waveform (the EDP inputs are driven freely, not derived from the
// word), and checks the decoder outputs and that exactly the bit at the
// position named by {EDP2, EDP1} is inverted. It then checks, for every data
// bit and every single-bit error, that the corrector restores the sent word
// when fed the syndrome a receiver would compute.
module tb_hamming31_corrector;
  import hamming31_pkg::*;

  logic             edp1, edp2;
  codeword_t        code, cm;
  position_onehot_t o;
  int checks = 0, failures = 0;

  hamming31_corrector dut (.edp1(edp1), .edp2(edp2), .code(code), .o(o), .cm(cm));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_cm;
    int         pos;
    // Part 1: free sweep of the five inputs.
    for (int i = 0; i < 32; i++) begin
      {edp2, edp1, code} = 5'(i);
      pos = 2 * int'(edp2) + int'(edp1);
      #10;
      exp_cm = code;
      if (pos != 0) exp_cm[pos-1] = ~exp_cm[pos-1];
      checks++;
      if (o !== 4'(1 << pos)) begin
        failures++;
        $display("FAIL edp2,edp1=%b%b: O=%b", edp2, edp1, o);
      end
      checks++;
      if (cm !== exp_cm) begin
        failures++;
        $display("FAIL edp2,edp1=%b%b code=%b: cm=%b expected %b",
                 edp2, edp1, code, cm, exp_cm);
      end
    end
    // Part 2: a sent word {d,d,d} with at most one flipped bit.
    for (int d = 0; d < 2; d++) begin
      for (int flip = 0; flip < 4; flip++) begin
        logic [2:0] sent;
        sent = {3{d[0]}};
        code = sent;
        if (flip != 0) code[flip-1] = ~code[flip-1];
        edp1 = code.p1 ^ code.d1;
        edp2 = code.p2 ^ code.d1;
        #10;
        checks++;
        if (cm !== sent) begin
          failures++;
          $display("FAIL d=%0d flip at %0d: cm=%b expected %b", d, flip, cm, sent);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
