// alu181_ref_pkg: reference models used by the ALU testbenches.
//
// ref_normal() follows the published function table of the 74181 for
// active-high operands: in arithmetic mode (M = 0) each select code names an
// addition "X plus Y" of two words built from A and B (plus the carry, Cn
// being active low); in logic mode (M = 1) each code names a Boolean
// function. Carry out and the look-ahead outputs are taken from the integer
// sums, not from gate equations.
// ref_hl() is a bit-serial (ripple) model of partitions beta and gamma
// driven directly by the internal lines H and L, used for test mode where
// H and L are independent.
package alu181_ref_pkg;
  import ctest_pkg::*;

  // Operand words of the arithmetic function "X plus Y" for select code s.
  function automatic void ref_operands(input logic [3:0] s, input logic [3:0] a,
                                       input logic [3:0] b,
                                       output logic [3:0] x, output logic [3:0] y);
    case (s)
      4'd0:  begin x = a;        y = 4'h0;    end  // A
      4'd1:  begin x = a | b;    y = 4'h0;    end  // A + B
      4'd2:  begin x = a | ~b;   y = 4'h0;    end  // A + /B
      4'd3:  begin x = 4'hF;     y = 4'h0;    end  // minus 1
      4'd4:  begin x = a;        y = a & ~b;  end  // A plus A./B
      4'd5:  begin x = a | b;    y = a & ~b;  end  // (A + B) plus A./B
      4'd6:  begin x = a;        y = ~b;      end  // A minus B minus 1
      4'd7:  begin x = 4'hF;     y = a & ~b;  end  // A./B minus 1
      4'd8:  begin x = a;        y = a & b;   end  // A plus A.B
      4'd9:  begin x = a;        y = b;       end  // A plus B
      4'd10: begin x = a | ~b;   y = a & b;   end  // (A + /B) plus A.B
      4'd11: begin x = 4'hF;     y = a & b;   end  // A.B minus 1
      4'd12: begin x = a;        y = a;       end  // A plus A
      4'd13: begin x = a | b;    y = a;       end  // (A + B) plus A
      4'd14: begin x = a | ~b;   y = a;       end  // (A + /B) plus A
      default: begin x = 4'hF;   y = a;       end  // A minus 1
    endcase
  endfunction

  // Logic-mode function for select code s.
  function automatic logic [3:0] ref_logic(input logic [3:0] s, input logic [3:0] a,
                                           input logic [3:0] b);
    case (s)
      4'd0:  return ~a;
      4'd1:  return ~(a | b);
      4'd2:  return ~a & b;
      4'd3:  return 4'h0;
      4'd4:  return ~(a & b);
      4'd5:  return ~b;
      4'd6:  return a ^ b;
      4'd7:  return a & ~b;
      4'd8:  return ~a | b;
      4'd9:  return ~(a ^ b);
      4'd10: return b;
      4'd11: return a & b;
      4'd12: return 4'hF;
      4'd13: return a | ~b;
      4'd14: return a | b;
      default: return a;
    endcase
  endfunction

  function automatic alu_out_t ref_normal(input alu_in_t in);
    alu_out_t   o;
    logic [3:0] x, y;
    logic [4:0] sum_c, sum_0;
    ref_operands(in.s, in.a, in.b, x, y);
    sum_c = {1'b0, x} + {1'b0, y} + {4'b0, ~in.cn};
    sum_0 = {1'b0, x} + {1'b0, y};
    o.f    = in.m ? ref_logic(in.s, in.a, in.b) : sum_c[3:0];
    o.aeqb = &o.f;
    o.cn4  = ~sum_c[4];
    o.g_n  = ~sum_0[4];
    o.p_n  = ~&(x | y);
    return o;
  endfunction

  // Ripple model of beta and gamma from the internal lines.
  function automatic alu_out_t ref_hl(input logic [3:0] h, input logic [3:0] l,
                                      input logic cn, input logic m);
    alu_out_t o;
    logic     c, g0;
    c  = ~cn;
    g0 = 1'b0;
    for (int i = 0; i < 4; i++) begin
      o.f[i] = (l[i] & ~h[i]) ^ (m | c);
      c  = ~l[i] | (~h[i] & c);
      g0 = ~l[i] | (~h[i] & g0);
    end
    o.aeqb = &o.f;
    o.cn4  = ~c;
    o.g_n  = ~g0;
    o.p_n  = |h;
    return o;
  endfunction

endpackage
