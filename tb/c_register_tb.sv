// c_register_tb: checks the C-register (8 cells).
// Reset clears it; random words are shifted in serially, one bit per clock
// with bit 0 first, and must appear on ctrl after 8 clocks while the
// previous word comes out on so in the same order; holding shift_en low
// keeps the content; a parallel load replaces it and wins over a shift.
module c_register_tb;
  localparam int W = 8;
  logic         clk = 0, rst_n = 0, shift_en = 0, si = 0, load_en = 0;
  logic [W-1:0] load_data = '0, ctrl;
  logic         so;
  int           checks = 0, failures = 0;

  c_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, want, input string what);
    checks++;
    if (got !== want) begin
      failures++; $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [W-1:0] word, prev, seen;
    #12;
    check(ctrl, '0, "reset");
    rst_n = 1;
    prev = '0;
    for (int n = 0; n < 20; n++) begin
      word = W'($urandom);
      seen = '0;
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        seen[i] = so;        // bit about to leave
        si = word[i]; shift_en = 1;
      end
      @(negedge clk);
      shift_en = 0;
      check(ctrl, word, "serial load");
      check(seen, prev, "serial read-back");
      prev = word;
      repeat (3) @(negedge clk);
      check(ctrl, word, "hold");
    end
    // parallel load, also while shifting
    @(negedge clk);
    load_data = 8'hA5; load_en = 1; shift_en = 1; si = 0;
    @(negedge clk);
    load_en = 0; shift_en = 0;
    check(ctrl, 8'hA5, "parallel load over shift");
    rst_n = 0;
    #1;
    check(ctrl, '0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
