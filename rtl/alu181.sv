// alu181: the 74181 4-bit ALU partitioned for test, built from four alpha
// slices (each holding one C-NAND), partition beta and partition gamma.
//
// Normal mode (c = 0): the 16 logic functions (M = 1) and 16 arithmetic
// functions (M = 0) of the 74181 with active-high operands; Cn and C(n+4)
// are active-low carries, P' and G' active-low look-ahead outputs.
// Test mode (c = 1): the four C-NANDs make the internal lines H and L of
// every bit directly controllable (with S0 = S1 = S2 = 0, H = NOT A and
// L = NOT B), so partitions beta and gamma can be driven through every
// input combination from the pins and observed at F, A=B, P', G', C(n+4).
//
// Interface: in (alu_in_t), c (one control line from the C-register),
// out (alu_out_t). Purely combinational.
module alu181
  import ctest_pkg::*;
(
  input  alu_in_t  in,
  input  logic     c,
  output alu_out_t out
);

  logic [3:0] h, l;

  for (genvar i = 0; i < 4; i++) begin : g_alpha
    alu181_alpha u_alpha (
      .a (in.a[i]),
      .b (in.b[i]),
      .s (in.s),
      .c (c),
      .h (h[i]),
      .l (l[i])
    );
  end

  alu181_beta u_beta (
    .cn   (in.cn),
    .m    (in.m),
    .h    (h),
    .l    (l),
    .f    (out.f),
    .aeqb (out.aeqb)
  );

  alu181_gamma u_gamma (
    .cn  (in.cn),
    .h   (h),
    .l   (l),
    .p_n (out.p_n),
    .g_n (out.g_n),
    .cn4 (out.cn4)
  );

endmodule
