// c_nand_tb: exhaustive check of the controllable NAND gate, for the
// default three-input cell (priority input x[0]) and for a copy with the
// priority input at x[2]. Expected values come from the gate's definition:
// NAND in normal mode (c = 0), complement of the priority input in test
// mode (c = 1).
module c_nand_tb;
  logic [2:0] x;
  logic       c, y0, y2;
  int         checks = 0, failures = 0;

  c_nand            dut0 (.x(x), .c(c), .y(y0));
  c_nand #(.PRIO(2)) dut2 (.x(x), .c(c), .y(y2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      {c, x} = 4'(k);
      #1;
      checks += 2;
      if (y0 !== (c ? !x[0] : !(x == 3'b111))) begin
        failures++; $display("FAIL prio0 c=%b x=%b y=%b", c, x, y0);
      end
      if (y2 !== (c ? !x[2] : !(x == 3'b111))) begin
        failures++; $display("FAIL prio2 c=%b x=%b y=%b", c, x, y2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
