// c_nand: controllable NAND gate (C-NAND).
//
// In normal mode (c = 0) the output is the NAND of all N inputs. In test mode
// (c = 1) the gate becomes transparent to its priority input: the output is
// the complement of x[PRIO] and does not depend on the other inputs, so a
// propagation d-cube is forced on the gate. In the n-MOS cell this is one
// extra pull-down transistor, gated by c, that shorts the series transistors
// of the non-priority inputs; here only the logic function is modelled.
//
// Interface: x[N-1:0] gate inputs, c control, y output. Purely combinational.
// The control polarity (0 = normal) and the complemented priority input are
// those of the original gate; the choice of x[0] as default priority input
// follows the marked input "a" of the three-input example.
module c_nand #(
  parameter int unsigned N    = 3,
  parameter int unsigned PRIO = 0
) (
  input  logic [N-1:0] x,
  input  logic         c,
  output logic         y
);

  if (PRIO >= N) begin : g_bad_prio
    $error("c_nand: PRIO must be below N");
  end

  always_comb y = c ? ~x[PRIO] : ~(&x);

endmodule
