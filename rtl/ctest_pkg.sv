// ctest_pkg: types and constants shared by the testable 74181 ALU, its
// self-test sequencer and the top level.
//
// The ALU's primary inputs and outputs are gathered in two packed structs so
// that the sequencer can drive and observe them as one pattern word. The
// per-partition self-test configuration record (C-register word, which
// pattern bits are cycled through all combinations, which outputs are
// compared) is this design's own encoding; the test method itself only
// requires that a partition be selected through the C-register and its
// inputs be cycled exhaustively.
package ctest_pkg;

  // Number of C-register cells used by the ALU. One control line drives the
  // four C-NAND gates of partition alpha.
  localparam int unsigned CREG_W = 1;

  // Primary inputs of the ALU, active-high data convention.
  typedef struct packed {
    logic [3:0] a;   // operand A3..A0
    logic [3:0] b;   // operand B3..B0
    logic [3:0] s;   // function select S3..S0
    logic       cn;  // carry in, active low
    logic       m;   // 1 = logic mode, 0 = arithmetic mode
  } alu_in_t;

  // Primary outputs of the ALU.
  typedef struct packed {
    logic [3:0] f;     // function outputs F3..F0
    logic       aeqb;  // A=B (all F high)
    logic       p_n;   // group propagate, active low
    logic       g_n;   // group generate, active low
    logic       cn4;   // carry out C(n+4), active low
  } alu_out_t;

  localparam int unsigned PW = $bits(alu_in_t);   // pattern width, 14
  localparam int unsigned RW = $bits(alu_out_t);  // response width, 8
  localparam int unsigned CNT_IDX_W = $clog2(PW);

  // Source of one pattern bit during the test of a partition: either a bit
  // of the exhaustive pattern counter, or a fixed value.
  typedef struct packed {
    logic                 use_cnt;  // 1: take counter bit idx, 0: take val
    logic [CNT_IDX_W-1:0] idx;      // counter bit
    logic                 val;      // fixed value
  } bit_src_t;

  // Self-test configuration of one partition.
  typedef struct packed {
    logic [CREG_W-1:0]    creg;      // C-register word while testing it
    logic [CNT_IDX_W:0]   nbits;     // 2**nbits patterns are applied
    bit_src_t [PW-1:0]    src;       // per pattern bit source
    logic [RW-1:0]        cmp_mask;  // outputs that are compared
  } part_cfg_t;

endpackage
