// alu181_gamma_tb: all 512 combinations of Cn, H and L, compared with the
// ripple model ref_hl (P', G', C(n+4)).
module alu181_gamma_tb;
  import ctest_pkg::*;
  import alu181_ref_pkg::*;
  logic       cn, p_n, g_n, cn4;
  logic [3:0] h, l;
  int         checks = 0, failures = 0;

  alu181_gamma dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_out_t r;
    for (int k = 0; k < 512; k++) begin
      {cn, h, l} = 9'(k);
      #1;
      r = ref_hl(h, l, cn, 1'b0);
      checks++;
      if ({p_n, g_n, cn4} !== {r.p_n, r.g_n, r.cn4}) begin
        failures++; $display("FAIL cn=%b h=%b l=%b p=%b g=%b c4=%b", cn, h, l, p_n, g_n, cn4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
