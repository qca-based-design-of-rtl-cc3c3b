// mux_2to1: 2-to-1 multiplexer.
//
// y follows in0 while sel is low and in1 while sel is high. In the error
// corrector in0 carries a received message bit, in1 its inverse and sel the
// decoder output for that bit's position, so the mux passes the bit through
// or flips it.
//
// Interface: in0, in1, sel in; y out. Combinational.
module mux_2to1 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);

  assign y = sel ? in1 : in0;

endmodule
