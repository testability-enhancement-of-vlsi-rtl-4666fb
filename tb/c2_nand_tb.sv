// c2_nand_tb: exhaustive check of the C''-gate: the NAND of a when c = 0,
// NOT x when c = 1 regardless of a.
module c2_nand_tb;
  logic [1:0] a;
  logic       x, c, f;
  int         checks = 0, failures = 0;

  c2_nand dut (.a(a), .x(x), .c(c), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      {c, x, a} = 4'(k);
      #1;
      checks++;
      if (f !== (c ? !x : (a != 2'b11))) begin
        failures++; $display("FAIL a=%b x=%b c=%b f=%b", a, x, c, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
