// alu181_beta_tb: all 1024 combinations of Cn, M, H and L, compared with
// the ripple model ref_hl (F and A=B).
module alu181_beta_tb;
  import ctest_pkg::*;
  import alu181_ref_pkg::*;
  logic       cn, m, aeqb;
  logic [3:0] h, l, f;
  int         checks = 0, failures = 0;

  alu181_beta dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_out_t r;
    for (int k = 0; k < 1024; k++) begin
      {cn, m, h, l} = 10'(k);
      #1;
      r = ref_hl(h, l, cn, m);
      checks++;
      if ({f, aeqb} !== {r.f, r.aeqb}) begin
        failures++; $display("FAIL cn=%b m=%b h=%b l=%b f=%b aeqb=%b", cn, m, h, l, f, aeqb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
