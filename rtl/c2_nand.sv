// c2_nand: C''-gate, a NAND gate with a built-in 2:1 multiplexer.
//
// A transistor in the ground leg of the NAND pull-down chain is driven by
// NOT c, and a second pull-down branch (x in series with a transistor driven
// by c) is added to the output node. With c = 0 the gate is the plain NAND
// of a; with c = 1 the NAND chain is cut off and the output is NOT x,
// whatever a is. Unlike the C'-gate there is no condition on the a inputs,
// at the cost of three devices and an inverter per control point.
//
// Interface: a[N-1:0] NAND inputs, x access input, c control, f output.
// Purely combinational. Control polarity c = 0 for normal operation is taken
// to match the other controllable gates; the complemented x follows from the
// single pull-down transistor driven by x.
module c2_nand #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic         x,
  input  logic         c,
  output logic         f
);

  logic nand_leg;  // pull-down through the NAND chain
  logic mux_leg;   // pull-down through the access branch

  always_comb begin
    nand_leg = (&a) & ~c;
    mux_leg  = x & c;
    f        = ~(nand_leg | mux_leg);
  end

endmodule
