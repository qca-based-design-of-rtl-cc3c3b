// hamming31_corrector: single-error corrector for a Hamming (3,1) word.
//
// A 2-to-4 decoder turns the syndrome {EDP2, EDP1} into one-hot outputs
// O0..O3. Each received bit (P1, P2, D1) feeds an inverter and a 2-to-1
// mux whose inputs are the bit and its inverse; the mux for position k is
// selected by Ok. A high Ok flips the bit at position k; every other mux
// passes its bit unchanged. O0 (no error) drives no mux. The outputs are
// the corrected message CM1, CM2, CM3 = corrected P1, P2, D1, so CM3 is the
// recovered data bit. Any single-bit error in the word is repaired; two or
// more errors are beyond the code and give a wrong word.
// The structure (decoder, three inverters, three muxes, O1..O3 on the
// select lines) follows the published block diagram; the active-high sense
// of the select lines is this design's reading.
//
// Interface: edp1, edp2, received code word in; o[3:0] and cm out.
// Combinational.
module hamming31_corrector
  import hamming31_pkg::*;
(
  input  logic             edp1,
  input  logic             edp2,
  input  codeword_t        code,
  output position_onehot_t o,
  output codeword_t        cm
);

  codeword_t code_n;

  decoder_2to4 u_dec (
    .edp1(edp1),
    .edp2(edp2),
    .o   (o)
  );

  // The three inverters.
  assign code_n = ~code;

  mux_2to1 u_mux_cm1 (.in0(code.p1), .in1(code_n.p1), .sel(o[1]), .y(cm.p1));
  mux_2to1 u_mux_cm2 (.in0(code.p2), .in1(code_n.p2), .sel(o[2]), .y(cm.p2));
  mux_2to1 u_mux_cm3 (.in0(code.d1), .in1(code_n.d1), .sel(o[3]), .y(cm.d1));

endmodule
