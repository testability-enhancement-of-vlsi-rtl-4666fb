// c_nor_tb: exhaustive check of the controllable NOR gate, default cell
// (priority x[0]) and a copy with priority x[1]. Expected: NOR when c = 1
// (normal mode), complement of the priority input when c = 0 (test mode).
module c_nor_tb;
  logic [2:0] x;
  logic       c, y0, y1;
  int         checks = 0, failures = 0;

  c_nor             dut0 (.x(x), .c(c), .y(y0));
  c_nor #(.PRIO(1)) dut1 (.x(x), .c(c), .y(y1));

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
      if (y0 !== (c ? (x == 3'b000) : !x[0])) begin
        failures++; $display("FAIL prio0 c=%b x=%b y=%b", c, x, y0);
      end
      if (y1 !== (c ? (x == 3'b000) : !x[1])) begin
        failures++; $display("FAIL prio1 c=%b x=%b y=%b", c, x, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
