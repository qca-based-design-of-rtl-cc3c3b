// decoder_2to4: 2-to-4 line decoder of the Hamming (3,1) syndrome.
//
// The syndrome {EDP2, EDP1} selects exactly one of the four outputs:
// o[0] (O0) is high when no parity check fails, o[k] (Ok) is high when the
// syndrome equals k, i.e. when the bit at position k is in error. EDP1 has
// weight 1 and EDP2 weight 2, as in the usual Hamming position numbering;
// the outputs are active high.
//
// Interface: edp1, edp2 in; o[3:0] out, one-hot. Combinational.
module decoder_2to4
  import hamming31_pkg::*;
(
  input  logic             edp1,
  input  logic             edp2,
  output position_onehot_t o
);

  always_comb begin
    o[0] = ~edp2 & ~edp1;
    o[1] = ~edp2 &  edp1;
    o[2] =  edp2 & ~edp1;
    o[3] =  edp2 &  edp1;
    assert (o != '0 && (o & (o - 1'b1)) == '0)
      else $error("decoder_2to4: outputs not one-hot: %b", o);
  end

endmodule
