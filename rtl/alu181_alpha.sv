// alu181_alpha: one bit slice of partition alpha of the 74181 ALU, with one
// of its gates replaced by a controllable NAND.
//
// The slice turns operand bits A and B into the two internal lines of the
// 74181 under the function select S3..S0 (active-high data):
//     H = NOT( A  OR  B.S0  OR  (NOT B).S1 )
//     L = NOT( A.(NOT B).S2  OR  A.B.S3 )
// In normal operation H = 1 forces L = 1, so partition beta can never see
// H = 1 with L = 0 and cannot be tested exhaustively from the pins. The
// gate forming A.B.S3 is therefore a three-input C-NAND (inputs A, B, S3)
// with B as its priority input. In test mode (c = 1) that product term
// becomes B, and with S0 = S1 = S2 = 0 the slice gives H = NOT A and
// L = NOT B: both lines are set independently from the primary inputs.
//
// Interface: a, b operand bits, s[3:0] function select, c C-gate control
// (1 = test), h and l outputs. Purely combinational. The equations are those
// of the standard 74181; which gate carries the C-NAND is this design's
// reading of the four C-NANDs the test method adds to partition alpha.
module alu181_alpha (
  input  logic       a,
  input  logic       b,
  input  logic [3:0] s,
  input  logic       c,
  output logic       h,
  output logic       l
);

  logic ab_s3_n;  // C-NAND output: NOT(A.B.S3), or NOT B in test mode

  c_nand #(.N(3), .PRIO(1)) u_cnand (
    .x ({s[3], b, a}),
    .c (c),
    .y (ab_s3_n)
  );

  always_comb begin
    h = ~(a | (b & s[0]) | (~b & s[1]));
    l = ~((a & ~b & s[2]) | ~ab_s3_n);
  end

endmodule
