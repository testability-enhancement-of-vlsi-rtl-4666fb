// c_nor: controllable NOR gate (C-NOR).
//
// In normal mode (c = 1) the output is the NOR of all N inputs. In test mode
// (c = 0) the gate is transparent to its priority input: the output is the
// complement of x[PRIO]. In the n-MOS cell a transistor gated by c sits in
// series between the output node and the pull-down transistors of the other
// inputs, so c = 0 disconnects them; here only the logic function is
// modelled.
//
// Interface: x[N-1:0] gate inputs, c control, y output. Purely combinational.
// The control constant (normal mode at c = 1) is the original gate's; the
// default priority input x[0] stands for its input "a".
module c_nor #(
  parameter int unsigned N    = 3,
  parameter int unsigned PRIO = 0
) (
  input  logic [N-1:0] x,
  input  logic         c,
  output logic         y
);

  if (PRIO >= N) begin : g_bad_prio
    $error("c_nor: PRIO must be below N");
  end

  always_comb y = c ? ~(|x) : ~x[PRIO];

endmodule
