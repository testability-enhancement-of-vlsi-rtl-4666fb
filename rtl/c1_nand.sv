// c1_nand: C'-gate, a NAND gate that doubles as a low-cost multiplexer.
//
// The pull-down network of an N-input NAND gets, in parallel, one series
// pair per access point j: a transistor driven by the access input x[j] and
// one driven by its control c[j]. The output is therefore
//     f = NOT( (a[0] AND ... AND a[N-1]) OR OR_j (c[j] AND x[j]) ).
// With every c[j] = 0 it is the plain NAND. With c[j] = 1 and the NAND term
// held at 0 (one a input low) the output carries NOT x[j], so an internal
// node wired to x[j] becomes observable at f. Only two devices are added per
// access point; the price is that some a input must be held low while
// observing.
//
// Interface: a[N-1:0] NAND inputs, x[P-1:0] access inputs, c[P-1:0]
// controls, f output. Purely combinational. The output polarity (x appears
// complemented) and the behaviour with c = 1 and all a high (f = 0) follow
// the transistor circuit and its test table of the original cell.
module c1_nand #(
  parameter int unsigned N = 2,
  parameter int unsigned P = 1
) (
  input  logic [N-1:0] a,
  input  logic [P-1:0] x,
  input  logic [P-1:0] c,
  output logic         f
);

  always_comb f = ~((&a) | (|(c & x)));

endmodule
