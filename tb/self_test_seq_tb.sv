// self_test_seq_tb: the self-test sequencer on a stand-in unit.
// Three partitions: 8 patterns from counter bits 0..2 (bit 0 also fanned
// out to pattern bit 5, bit 13 fixed at 1), 16 patterns on pattern bits
// 13..10 with C-register word 1, and a single fixed pattern. The stand-in
// unit's response is a fixed function of the pattern; the "expected" input
// is the same function, with one error injected on a compared output and
// one on a masked output. Checked: every applied pattern, the partition
// number, the C-register words loaded (including the final all-zero word),
// the number of cycles from start to done (3 loads + 25 patterns + 1
// restore + 1), and that exactly one mismatch is counted. A second run
// without the compared error must pass.
module self_test_seq_tb;
  import ctest_pkg::*;
  localparam int NPART = 3;
  logic                clk = 0, rst_n = 0, start = 0;
  part_cfg_t           cfg [NPART];
  logic                creg_load, pat_valid, busy, done, fail;
  logic [CREG_W-1:0]   creg_word;
  logic [PW-1:0]       pat;
  logic [1:0]          part;
  logic [RW-1:0]       resp, expected;
  logic [15:0]         mismatches;
  int                  checks = 0, failures = 0;
  logic                inject;

  self_test_seq #(.NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [RW-1:0] unit_fn(input logic [PW-1:0] p);
    return p[7:0] ^ {p[13:8], 2'b01};
  endfunction

  // pattern expected for partition pt, counter value n
  function automatic logic [PW-1:0] want_pat(input int pt, input int n);
    logic [PW-1:0] w = '0;
    case (pt)
      0: begin w[2:0] = 3'(n); w[5] = n[0]; w[13] = 1'b1; end
      1: begin w[13:10] = {n[0], n[1], n[2], n[3]}; end
      default: w = 14'h2A5C;
    endcase
    return w;
  endfunction

  always_comb begin
    resp     = unit_fn(pat);
    expected = resp;
    expected[7] = ~resp[7];                                   // masked in partition 0 only
    if (part != 0) expected[7] = resp[7];
    if (inject && part == 1 && pat == want_pat(1, 5)) expected[0] = ~resp[0];
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic with_error);
    int n_pat [NPART];
    int cycles, loads;
    logic [CREG_W-1:0] words [4];
    inject = with_error;
    foreach (n_pat[i]) n_pat[i] = 0;
    cycles = 0; loads = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (!done && cycles < 200) begin
      chk(busy, "busy during run");
      if (creg_load) begin
        if (loads < 4) words[loads] = creg_word;
        loads++;
      end
      if (pat_valid) begin
        chk(pat == want_pat(part, n_pat[part]),
            $sformatf("pattern part %0d n %0d got %h", part, n_pat[part], pat));
        n_pat[part]++;
      end
      @(negedge clk); cycles++;
    end
    chk(cycles == 3 + 8 + 16 + 1 + 1 + 1, $sformatf("cycles start->done %0d", cycles));
    chk(n_pat[0] == 8 && n_pat[1] == 16 && n_pat[2] == 1, "pattern counts");
    chk(loads == 4, $sformatf("C-register loads %0d", loads));
    chk(words[0] == 0 && words[1] == 1 && words[2] == 0 && words[3] == 0, "C-register words");
    chk(fail == with_error, "fail flag");
    chk(mismatches == (with_error ? 16'd1 : 16'd0), $sformatf("mismatches %0d", mismatches));
    chk(!busy, "idle after done");
  endtask

  initial begin
    logic [PW-1:0] fixed2;
    cfg[0] = '0; cfg[1] = '0; cfg[2] = '0;
    cfg[0].nbits = 3;
    cfg[0].cmp_mask = 8'h7F;
    for (int k = 0; k < 3; k++) cfg[0].src[k] = '{use_cnt: 1'b1, idx: CNT_IDX_W'(k), val: 1'b0};
    cfg[0].src[5]  = '{use_cnt: 1'b1, idx: '0, val: 1'b0};
    cfg[0].src[13] = '{use_cnt: 1'b0, idx: '0, val: 1'b1};
    cfg[1].creg = 1'b1;
    cfg[1].nbits = 4;
    cfg[1].cmp_mask = 8'hFF;
    for (int k = 0; k < 4; k++) cfg[1].src[13-k] = '{use_cnt: 1'b1, idx: CNT_IDX_W'(k), val: 1'b0};
    cfg[2].nbits = 0;
    cfg[2].cmp_mask = 8'hFF;
    fixed2 = want_pat(2, 0);
    for (int k = 0; k < PW; k++) cfg[2].src[k] = '{use_cnt: 1'b0, idx: '0, val: fixed2[k]};
    inject = 0;
    #22 rst_n = 1;
    chk(!busy && !done && !fail, "idle after reset");
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
