// alu181_alpha_tb: exhaustive check of one alpha slice.
// Normal mode: the slice's lines, read as operand bits X = NOT h and
// Y = NOT l, must add up to the per-bit operand sum of the 74181 function
// table (ref_operands), with Y never set without X. Test mode: h = NOT a and
// l = NOT(a.(NOT b).S2 + b), so with S0..S2 = 0 the lines follow the pins;
// the testbench also counts that h = 1, l = 0 is reached in test mode only.
module alu181_alpha_tb;
  import alu181_ref_pkg::*;
  logic       a, b, c, h, l;
  logic [3:0] s;
  int         checks = 0, failures = 0, hl10_normal = 0, hl10_test = 0;

  alu181_alpha dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] xw, yw;
    logic [1:0] sum;
    for (int k = 0; k < 128; k++) begin
      {c, s, a, b} = 7'(k);
      #1;
      if (h && !l) begin
        if (c) hl10_test++; else hl10_normal++;
      end
      if (!c) begin
        ref_operands(s, {3'b0, a}, {3'b0, b}, xw, yw);
        sum = 2'(xw[0]) + 2'(yw[0]);
        checks++;
        if ({~h, ~l} !== {sum != 0, sum == 2}) begin
          failures++; $display("FAIL normal s=%b a=%b b=%b h=%b l=%b", s, a, b, h, l);
        end
      end else begin
        checks++;
        if ({h, l} !== {!(a || (b && s[0]) || (!b && s[1])), !((a && !b && s[2]) || b)}) begin
          failures++; $display("FAIL test s=%b a=%b b=%b h=%b l=%b", s, a, b, h, l);
        end
      end
    end
    checks += 2;
    if (hl10_normal != 0) begin failures++; $display("FAIL h=1,l=0 reached in normal mode"); end
    if (hl10_test == 0)   begin failures++; $display("FAIL h=1,l=0 not reached in test mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
