// alu181_gamma: partition gamma of the 74181 ALU, the carry look-ahead
// outputs.
//
// With g_i = NOT L_i and p_i = NOT H_i:
//     P'      = NOT(p3.p2.p1.p0)                       group propagate
//     G'      = NOT(g3 + p3.g2 + p3.p2.g1 + p3.p2.p1.g0)  group generate
//     C(n+4)  = NOT(G + P.c0),  c0 = NOT Cn            carry out
// All three outputs are active low, as on the original part. The carry out
// needs the carry in, so Cn is an input of this partition.
//
// Interface: cn, h[3:0], l[3:0] in; p_n, g_n, cn4 out. Purely
// combinational. The equations are those of the standard 74181.
module alu181_gamma (
  input  logic       cn,
  input  logic [3:0] h,
  input  logic [3:0] l,
  output logic       p_n,
  output logic       g_n,
  output logic       cn4
);

  logic [3:0] g, p;
  logic       grp_g, grp_p;

  always_comb begin
    g     = ~l;
    p     = ~h;
    grp_p = &p;
    grp_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    p_n   = ~grp_p;
    g_n   = ~grp_g;
    cn4   = ~(grp_g | (grp_p & ~cn));
  end

endmodule
