// ctest_top_tb: end-to-end test of the testable 74181 at its only
// configuration (the top has no parameters).
//  1. Normal mode: all 16384 input combinations against the 74181 function
//     table; counts arithmetic and logic operations, carries out and A=B.
//  2. The stand-alone C-gate cells, exhaustively, through the top's pins.
//  3. Test mode entered by shifting a 1 into the C-register through its
//     serial pin, and read back on the serial output; then partitions beta
//     and gamma driven through all 1024 combinations of A, B, Cn, M (S = 0)
//     and compared with the ripple model fed by H = NOT A, L = NOT B; counts
//     the bits that see H = 1, L = 0, which normal mode cannot produce.
//  4. Self-test: the sequencer tests alpha (64 patterns, normal mode), beta
//     (1024, test mode) and gamma (512, test mode), the expected responses
//     coming from a model of the on-chip control store. A fault-free run
//     must pass in 3 + 1600 + 2 cycles; a run with an internal line forced
//     stuck-at-0 must fail.
// Every mechanism above is counted; one that never happened is a failure.
module ctest_top_tb;
  import ctest_pkg::*;
  import alu181_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  a, b, s, f;
  logic        cn, m, aeqb, p_n, g_n, cn4;
  logic        creg_shift = 0, creg_si = 0, creg_so;
  logic        st_start = 0;
  part_cfg_t   st_cfg [3];
  logic [RW-1:0] st_expected;
  logic [PW-1:0] st_pat;
  logic        st_pat_valid, st_busy, st_done, st_fail;
  logic [1:0]  st_part;
  logic [15:0] st_mismatches;
  logic [2:0]  cnand_x, cnor_x;
  logic        cnand_c, cnand_y, cnor_c, cnor_y;
  logic [1:0]  c1_a, c2_a;
  logic        c1_x, c1_c, c1_f, c2_x, c2_c, c2_f;

  int checks = 0, failures = 0;
  int n_arith = 0, n_logic = 0, n_carry = 0, n_aeqb = 0, n_test_hl10 = 0;
  int n_creg_readback = 0, n_selftest_pass = 0, n_selftest_detect = 0, n_cells = 0;

  ctest_top dut (.*);

  always #5 clk = ~clk;

  // Model of the control store: expected response for the applied pattern.
  always_comb begin
    alu_in_t pin;
    pin = alu_in_t'(st_pat);
    if (st_part == 2'd0) st_expected = ref_normal(pin);
    else                 st_expected = ref_hl(~pin.a, ~pin.b, pin.cn, pin.m);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic alu_out_t pins_out();
    return '{f: f, aeqb: aeqb, p_n: p_n, g_n: g_n, cn4: cn4};
  endfunction

  task automatic shift_creg(input logic bit_in, output logic bit_out);
    @(negedge clk);
    bit_out = creg_so;
    creg_si = bit_in; creg_shift = 1;
    @(negedge clk);
    creg_shift = 0;
  endtask

  function automatic bit_src_t cnt_bit(input int k);
    return '{use_cnt: 1'b1, idx: CNT_IDX_W'(k), val: 1'b0};
  endfunction

  function automatic bit_src_t fixed(input logic v);
    return '{use_cnt: 1'b0, idx: '0, val: v};
  endfunction

  // Pattern bit positions inside alu_in_t: {a[3:0], b[3:0], s[3:0], cn, m}
  localparam int P_M = 0, P_CN = 1, P_S = 2, P_B = 6, P_A = 10;

  task automatic setup_selftest();
    for (int p = 0; p < 3; p++) st_cfg[p] = '0;
    // alpha: A bits <- counter 0, B bits <- counter 1, S <- counter 5..2,
    // logic mode so that every slice shows at F; all slices in parallel.
    st_cfg[0].creg = 1'b0;
    st_cfg[0].nbits = 6;
    st_cfg[0].cmp_mask = '1;
    for (int i = 0; i < 4; i++) begin
      st_cfg[0].src[P_A+i] = cnt_bit(0);
      st_cfg[0].src[P_B+i] = cnt_bit(1);
      st_cfg[0].src[P_S+i] = cnt_bit(2+i);
    end
    st_cfg[0].src[P_CN] = fixed(1'b1);
    st_cfg[0].src[P_M]  = fixed(1'b1);
    // beta: test mode, A, B, Cn, M cycled, S = 0, F and A=B compared.
    st_cfg[1].creg = 1'b1;
    st_cfg[1].nbits = 10;
    st_cfg[1].cmp_mask = 8'b1111_1000;
    for (int k = 0; k < 10; k++) st_cfg[1].src[k] = (k >= P_S && k < P_B) ? fixed(1'b0) : cnt_bit(k < P_S ? k : k - 4);
    for (int k = P_S; k < P_B; k++) st_cfg[1].src[k] = fixed(1'b0);
    for (int k = P_B; k < PW; k++) st_cfg[1].src[k] = cnt_bit(k - 4);
    st_cfg[1].src[P_M]  = cnt_bit(0);
    st_cfg[1].src[P_CN] = cnt_bit(1);
    // gamma: test mode, A, B, Cn cycled, M = 0, S = 0, P', G', C(n+4) compared.
    st_cfg[2].creg = 1'b1;
    st_cfg[2].nbits = 9;
    st_cfg[2].cmp_mask = 8'b0000_0111;
    st_cfg[2].src[P_M]  = fixed(1'b0);
    st_cfg[2].src[P_CN] = cnt_bit(0);
    for (int k = P_S; k < P_B; k++) st_cfg[2].src[k] = fixed(1'b0);
    for (int k = P_B; k < PW; k++) st_cfg[2].src[k] = cnt_bit(k - 5);
  endtask

  task automatic run_selftest(output int cycles);
    @(negedge clk); st_start = 1;
    @(negedge clk); st_start = 0; cycles = 1;
    while (!st_done && cycles < 5000) begin
      @(negedge clk); cycles++;
    end
  endtask

  initial begin
    alu_out_t r;
    alu_in_t  in;
    logic     so_bit;
    int       cyc;

    a = 0; b = 0; s = 0; cn = 1; m = 0;
    cnand_x = 0; cnand_c = 0; cnor_x = 0; cnor_c = 1;
    c1_a = 0; c1_x = 0; c1_c = 0; c2_a = 0; c2_x = 0; c2_c = 0;
    setup_selftest();
    #22 rst_n = 1;

    // 1. normal mode
    for (int k = 0; k < 16384; k++) begin
      in = alu_in_t'(k);
      {a, b, s, cn, m} = in;
      #1;
      r = ref_normal(in);
      chk(pins_out() === r, $sformatf("normal in=%h out=%h want %h", in, pins_out(), r));
      if (m) n_logic++; else n_arith++;
      if (!cn4) n_carry++;
      if (aeqb) n_aeqb++;
      chk(&(~dut.u_alu.h | dut.u_alu.l), "normal mode: H=1 forces L=1");
    end

    // 2. C-gate cells
    for (int k = 0; k < 16; k++) begin
      {cnand_c, cnand_x} = 4'(k);
      {cnor_c, cnor_x}   = 4'(k);
      {c1_c, c1_x, c1_a} = 4'(k);
      {c2_c, c2_x, c2_a} = 4'(k);
      #1;
      chk(cnand_y === (cnand_c ? !cnand_x[0] : !(&cnand_x)), "C-NAND cell");
      chk(cnor_y  === (cnor_c ? !(|cnor_x) : !cnor_x[0]), "C-NOR cell");
      chk(c1_f    === !((&c1_a) || (c1_c && c1_x)), "C'-NAND cell");
      chk(c2_f    === (c2_c ? !c2_x : !(&c2_a)), "C''-NAND cell");
      n_cells++;
    end

    // 3. test mode through the serial C-register pin
    shift_creg(1'b1, so_bit);
    chk(so_bit === 1'b0, "C-register empty after reset");
    chk(dut.u_alu.c === 1'b1, "C-gate control set after serial load");
    for (int k = 0; k < 1024; k++) begin
      {a, b, cn, m} = 10'(k);
      s = 4'h0;
      #1;
      r = ref_hl(~a, ~b, cn, m);
      chk(pins_out() === r, $sformatf("test a=%h b=%h cn=%b m=%b out=%h want %h", a, b, cn, m, pins_out(), r));
      for (int i = 0; i < 4; i++) if (dut.u_alu.h[i] && !dut.u_alu.l[i]) n_test_hl10++;
    end
    shift_creg(1'b0, so_bit);
    chk(so_bit === 1'b1, "C-register read back on serial output");
    if (so_bit === 1'b1) n_creg_readback++;
    chk(dut.u_alu.c === 1'b0, "back to normal mode");
    {a, b, s, cn, m} = 14'h2A5B;
    #1;
    chk(pins_out() === ref_normal(alu_in_t'(14'h2A5B)), "normal mode after test mode");

    // 4. self-test, fault free
    run_selftest(cyc);
    chk(cyc == 3 + 64 + 1024 + 512 + 2, $sformatf("self-test cycles %0d", cyc));
    chk(st_done && !st_fail && st_mismatches == 0,
        $sformatf("fault-free self-test fail=%b mismatches=%0d", st_fail, st_mismatches));
    if (st_done && !st_fail) n_selftest_pass++;
    chk(dut.u_alu.c === 1'b0, "C-register cleared after self-test");
    #1;
    chk(pins_out() === ref_normal(alu_in_t'(14'h2A5B)), "pins drive the ALU after self-test");

    // self-test with an internal line stuck at 0
    force dut.u_alu.h[2] = 1'b0;
    run_selftest(cyc);
    release dut.u_alu.h[2];
    chk(st_done && st_fail && st_mismatches > 0, "self-test detects stuck-at-0 on H2");
    if (st_fail) n_selftest_detect++;
    $display("self-test with H2 stuck-at-0: %0d mismatches", st_mismatches);

    $display("normal arith=%0d logic=%0d carry-out=%0d A=B=%0d; test-mode H=1,L=0 bits=%0d",
             n_arith, n_logic, n_carry, n_aeqb, n_test_hl10);
    $display("C-register read-backs=%0d, self-test passes=%0d detections=%0d, cell vectors=%0d",
             n_creg_readback, n_selftest_pass, n_selftest_detect, n_cells);
    chk(n_arith > 0 && n_logic > 0 && n_carry > 0 && n_aeqb > 0, "normal-mode mechanisms seen");
    chk(n_test_hl10 > 0, "test mode reached H=1, L=0");
    chk(n_creg_readback > 0, "C-register serial read-back seen");
    chk(n_selftest_pass > 0 && n_selftest_detect > 0, "self-test pass and detection seen");
    chk(n_cells > 0, "gate cells exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
