// tb_feynman_gate: exhaustive self-check of the Feynman gate.
// Applies all four input patterns, checks P = A and Q = A xor B against a
// truth table written out here, and checks reversibility: feeding (P, Q)
// through a second gate must give back (A, B).
module tb_feynman_gate;

  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  // Expected {P, Q} for {A, B} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #10;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b: p=%b q=%b expected %b", a, b, p, q, EXP[i]);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL reversibility a=%b b=%b gave back %b%b", a, b, p2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
