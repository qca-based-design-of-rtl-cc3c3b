// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// Output P mirrors input A and output Q is A xor B. The mapping is a
// bijection on the four input patterns, so no information is lost; applying
// the gate twice returns the original inputs. Every XOR in the Hamming (3,1)
// encoder and error detector is one of these gates: tying B to 0 makes the
// gate a reversible fan-out (P = Q = A).
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
