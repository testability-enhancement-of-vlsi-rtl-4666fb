// ctest_top: a 74181 ALU made testable with controllable gates, together
// with the stand-alone controllable gate cells.
//
// The ALU (alu181) has four C-NAND gates in its input partition alpha. A
// one-cell C-register drives their common control line: with the register
// cleared the ALU is an ordinary 74181; with it set, the internal lines H
// and L of every bit follow the A and B pins, so the partitions beta
// (function outputs) and gamma (look-ahead outputs) can each be cycled
// through all input combinations from the pins. The C-register is loaded
// serially through creg_si while creg_shift is high and read back on
// creg_so.
//
// A self-test sequencer can run the same partition tests on chip: while it
// is busy it loads the C-register itself and the ALU inputs come from its
// pattern counter instead of the pins (a multiplexer that is this design's
// addition). The per-partition configuration and the expected responses
// come from an on-chip control store that is not part of this design; they
// enter on st_cfg and st_expected, and st_pat shows the applied pattern so
// that the store can be addressed by it.
//
// Beside the ALU, and unconnected to it, one instance of each controllable
// gate cell (three-input C-NAND and C-NOR, C'-NAND, C''-NAND) is brought
// out on its own pins.
//
// Timing: the ALU is combinational; C-register and sequencer change on the
// rising edge of clk; rst_n is an asynchronous active-low reset.
module ctest_top
  import ctest_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // 74181 pins
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  input  logic [3:0]  s,
  input  logic        cn,
  input  logic        m,
  output logic [3:0]  f,
  output logic        aeqb,
  output logic        p_n,
  output logic        g_n,
  output logic        cn4,
  // C-register serial pin pair
  input  logic        creg_shift,
  input  logic        creg_si,
  output logic        creg_so,
  // self-test
  input  logic        st_start,
  input  part_cfg_t   st_cfg [3],
  input  logic [RW-1:0] st_expected,
  output logic [PW-1:0] st_pat,
  output logic        st_pat_valid,
  output logic [1:0]  st_part,
  output logic        st_busy,
  output logic        st_done,
  output logic        st_fail,
  output logic [15:0] st_mismatches,
  // stand-alone controllable gate cells
  input  logic [2:0]  cnand_x,
  input  logic        cnand_c,
  output logic        cnand_y,
  input  logic [2:0]  cnor_x,
  input  logic        cnor_c,
  output logic        cnor_y,
  input  logic [1:0]  c1_a,
  input  logic        c1_x,
  input  logic        c1_c,
  output logic        c1_f,
  input  logic [1:0]  c2_a,
  input  logic        c2_x,
  input  logic        c2_c,
  output logic        c2_f
);

  logic [CREG_W-1:0] ctrl;
  logic              creg_load;
  logic [CREG_W-1:0] creg_word;
  alu_in_t           pin_in, alu_in;
  alu_out_t          alu_out;

  c_register #(.W(CREG_W)) u_creg (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (creg_shift),
    .si        (creg_si),
    .so        (creg_so),
    .load_en   (creg_load),
    .load_data (creg_word),
    .ctrl      (ctrl)
  );

  self_test_seq #(.NPART(3)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (st_start),
    .cfg        (st_cfg),
    .creg_load  (creg_load),
    .creg_word  (creg_word),
    .pat        (st_pat),
    .pat_valid  (st_pat_valid),
    .part       (st_part),
    .resp       (alu_out),
    .expected   (st_expected),
    .busy       (st_busy),
    .done       (st_done),
    .fail       (st_fail),
    .mismatches (st_mismatches)
  );

  always_comb begin
    pin_in = '{a: a, b: b, s: s, cn: cn, m: m};
    alu_in = st_pat_valid ? alu_in_t'(st_pat) : pin_in;
  end

  alu181 u_alu (
    .in  (alu_in),
    .c   (ctrl[0]),
    .out (alu_out)
  );

  assign f    = alu_out.f;
  assign aeqb = alu_out.aeqb;
  assign p_n  = alu_out.p_n;
  assign g_n  = alu_out.g_n;
  assign cn4  = alu_out.cn4;

  c_nand #(.N(3), .PRIO(0)) u_cnand (.x(cnand_x), .c(cnand_c), .y(cnand_y));
  c_nor  #(.N(3), .PRIO(0)) u_cnor  (.x(cnor_x),  .c(cnor_c),  .y(cnor_y));
  c1_nand #(.N(2), .P(1))   u_c1    (.a(c1_a), .x(c1_x), .c(c1_c), .f(c1_f));
  c2_nand #(.N(2))          u_c2    (.a(c2_a), .x(c2_x), .c(c2_c), .f(c2_f));

endmodule
