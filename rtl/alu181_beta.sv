// alu181_beta: partition beta of the 74181 ALU, the function outputs.
//
// With g_i = NOT L_i (carry generate) and p_i = NOT H_i (carry propagate)
// the internal carries are formed by two-level look-ahead from the carry in
// (c0 = NOT Cn, Cn being active low):
//     c1 = g0 + p0.c0
//     c2 = g1 + p1.g0 + p1.p0.c0
//     c3 = g2 + p2.g1 + p2.p1.g0 + p2.p1.p0.c0
// Each output is the half-sum L_i.(NOT H_i) exclusive-ORed with (M + c_i):
// in logic mode (M = 1) every carry is masked and F is the complemented
// half-sum. A=B is the AND of the four F outputs (an open-collector output
// on the original part, an ordinary output here).
//
// Interface: cn, m, h[3:0], l[3:0] in; f[3:0], aeqb out. Purely
// combinational. The equations are those of the standard 74181.
module alu181_beta (
  input  logic       cn,
  input  logic       m,
  input  logic [3:0] h,
  input  logic [3:0] l,
  output logic [3:0] f,
  output logic       aeqb
);

  logic [2:0] g, p;  // bit 3 generate/propagate only feed partition gamma
  logic [3:0] hs, c;

  always_comb begin
    g  = ~l[2:0];
    p  = ~h[2:0];
    hs = l & ~h;
    c[0] = ~cn;
    c[1] = g[0] | (p[0] & ~cn);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & ~cn);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & ~cn);
    f    = hs ^ ({4{m}} | c);
    aeqb = &f;
  end

endmodule
