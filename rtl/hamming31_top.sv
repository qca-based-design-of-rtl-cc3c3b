// hamming31_top: a complete Hamming (3,1) link, sender and receiver.
//
// Sending side: the code generator turns the data bit d1 into the code word
// tx_code = {D1, P2, P1}. The word then crosses a channel that lies outside
// this design; the channel's output comes back in on rx_code. Receiving side:
// the error detector computes EDP1 and EDP2 from rx_code, and the corrector
// decodes them and flips the single erroneous bit, giving the corrected word
// cm and the recovered data bit d1_out (= CM3). A test bench closes the loop
// by driving rx_code with tx_code, optionally with bits flipped.
//
// Interface: d1 in, tx_code out; rx_code in; edp1, edp2, garbage, dec_o, cm,
// d1_out out. Fully combinational: every output settles in the same cycle
// its inputs change, there is no clock or reset.
module hamming31_top
  import hamming31_pkg::*;
(
  input  logic             d1,
  output codeword_t        tx_code,
  input  codeword_t        rx_code,
  output logic             edp1,
  output logic             edp2,
  output logic [1:0]       garbage,
  output position_onehot_t dec_o,
  output codeword_t        cm,
  output logic             d1_out
);

  logic tx_p1, tx_p2;

  // The code word type must carry D + P bits (2^P >= D + P + 1).
  if ($bits(codeword_t) != CODE_BITS || 2**PARITY_BITS < CODE_BITS + 1) begin : g_size_check
    $error("hamming31_top: code word size does not match the Hamming (3,1) code");
  end

  hamming31_hcg u_hcg (
    .d1  (d1),
    .p1  (tx_p1),
    .p2  (tx_p2)
  );

  assign tx_code = '{d1: d1, p2: tx_p2, p1: tx_p1};

  hamming31_edp u_edp (
    .code   (rx_code),
    .edp1   (edp1),
    .edp2   (edp2),
    .garbage(garbage)
  );

  hamming31_corrector u_cor (
    .edp1(edp1),
    .edp2(edp2),
    .code(rx_code),
    .o   (dec_o),
    .cm  (cm)
  );

  assign d1_out = cm.d1;

endmodule
