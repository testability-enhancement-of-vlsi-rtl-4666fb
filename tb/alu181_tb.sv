// alu181_tb: the whole partitioned ALU.
// Normal mode (c = 0): all 16384 combinations of A, B, S, Cn and M against
// the 74181 function table (ref_normal). Test mode (c = 1): with S = 0 all
// 1024 combinations of A, B, Cn and M, against the ripple model driven by
// H = NOT A and L = NOT B, i.e. beta and gamma controlled from the pins.
module alu181_tb;
  import ctest_pkg::*;
  import alu181_ref_pkg::*;
  alu_in_t  in;
  alu_out_t out, r;
  logic     c;
  int       checks = 0, failures = 0;

  alu181 dut (.in(in), .c(c), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 0;
    for (int k = 0; k < 16384; k++) begin
      in = alu_in_t'(k);
      #1;
      r = ref_normal(in);
      checks++;
      if (out !== r) begin
        failures++;
        if (failures < 10) $display("FAIL normal in=%h out=%h want %h", in, out, r);
      end
    end
    c = 1;
    for (int k = 0; k < 1024; k++) begin
      {in.a, in.b, in.cn, in.m} = 10'(k);
      in.s = 4'h0;
      #1;
      r = ref_hl(~in.a, ~in.b, in.cn, in.m);
      checks++;
      if (out !== r) begin
        failures++;
        if (failures < 10) $display("FAIL test in=%h out=%h want %h", in, out, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
