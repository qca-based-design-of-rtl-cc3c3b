// hamming31_hcg: Hamming (3,1) code generator for a single data bit.
//
// P1 covers positions 1 and 3 and P2 covers positions 2 and 3; with D1 the
// only bit at position 3, even parity makes both P1 and P2 equal to D1. The
// generator is a single Feynman gate with D1 on its control input and a
// constant 0 on its target input: Q = D1 xor 0 gives P1 and the mirrored
// output P = D1 gives P2. The code word is {D1, P2, P1} in positions 3..1
// (Table 1 order); hamming31_top assembles it.
// Which gate output is named P1 and which P2 is this design's choice; both
// carry the same value.
//
// Interface: d1 in; p1, p2 out. Combinational.
module hamming31_hcg (
  input  logic d1,
  output logic p1,
  output logic p2
);

  feynman_gate u_fg (
    .a(d1),
    .b(1'b0),
    .p(p2),
    .q(p1)
  );

endmodule
