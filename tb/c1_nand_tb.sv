// c1_nand_tb: checks the C'-gate.
// First the four rows of the cell's published test (inputs a, b, c, x and
// expected f, '-' rows tried with both values), then every input
// combination of a two-input, two-access-point version against the rule:
// NAND when no control is set; NOT x_j when control j is set and the NAND
// term is 0; 0 when the NAND term is 1 and a control is set.
module c1_nand_tb;
  logic [1:0] a;
  logic       x, c, f;
  logic [1:0] a2, x2, c2;
  logic       f2;
  int         checks = 0, failures = 0;

  c1_nand                dut  (.a(a),  .x(x),  .c(c),  .f(f));
  c1_nand #(.N(2), .P(2)) dut2 (.a(a2), .x(x2), .c(c2), .f(f2));

  task automatic row(input logic ta, tb_, tc, tx, tf);
    a = {tb_, ta}; c = tc; x = tx;
    #1;
    checks++;
    if (f !== tf) begin
      failures++; $display("FAIL table a=%b b=%b c=%b x=%b f=%b want %b", ta, tb_, tc, tx, f, tf);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    row(0, 1, 0, 1, 1);
    row(1, 1, 0, 0, 0); row(1, 1, 0, 1, 0);
    row(1, 0, 1, 0, 1);
    row(0, 0, 1, 1, 0); row(1, 0, 1, 1, 0);
    for (int k = 0; k < 64; k++) begin
      {a2, x2, c2} = 6'(k);
      #1;
      if (a2 == 2'b11)        want = 1'b0;
      else if (c2 == 2'b00)   want = 1'b1;
      else                    want = !((c2[0] && x2[0]) || (c2[1] && x2[1]));
      checks++;
      if (f2 !== want) begin
        failures++; $display("FAIL P=2 a=%b x=%b c=%b f=%b", a2, x2, c2, f2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
