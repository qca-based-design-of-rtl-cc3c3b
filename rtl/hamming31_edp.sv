// hamming31_edp: error detector parity bits for a received Hamming (3,1) word.
//
// Two Feynman gates recompute the parity checks at the receiver:
//   EDP1 = P1 xor D1   (positions 1 and 3)
//   EDP2 = P2 xor D1   (positions 2 and 3)
// Each gate takes D1 on its control input and one parity bit on its target
// input; its Q output is the EDP bit and its P output, a copy of D1, is the
// gate's garbage output, brought out on `garbage` so that the circuit stays
// reversible. {EDP2, EDP1} is the syndrome: 0 when the word is intact,
// otherwise the position (1..3) of a single flipped bit.
//
// Interface: received code word in; edp1, edp2, garbage out. Combinational.
module hamming31_edp
  import hamming31_pkg::*;
(
  input  codeword_t  code,
  output logic       edp1,
  output logic       edp2,
  output logic [1:0] garbage
);

  feynman_gate u_fg1 (
    .a(code.d1),
    .b(code.p1),
    .p(garbage[0]),
    .q(edp1)
  );

  feynman_gate u_fg2 (
    .a(code.d1),
    .b(code.p2),
    .p(garbage[1]),
    .q(edp2)
  );

endmodule
