// self_test_seq: on-chip sequencer for the partition-by-partition test.
//
// For each of NPART partitions, in order, the sequencer
//   1. loads the partition's word into the C-register (one-cycle creg_load
//      pulse), which puts the C-gates in the state that isolates the
//      partition and opens paths to it from the pins;
//   2. applies 2**nbits patterns, one per clock, produced by a binary
//      counter: each pattern bit takes either a chosen counter bit or a fixed
//      value (cfg.src), so the partition's inputs are cycled through every
//      combination while the other inputs stay put. No pattern memory is
//      needed;
//   3. compares the response with the expected response under cfg.cmp_mask
//      in the same cycle the pattern is applied, counting mismatches.
// After the last partition it loads an all-zero word (all C-gates back in
// normal mode) and raises done. fail is sticky until the next start.
//
// Interface: start pulse; cfg[NPART] per-partition configuration from the
// on-chip control store; creg_load/creg_word to the C-register; pat and
// pat_valid to the unit under test; resp from it and expected from the
// control store; busy, done, fail, mismatches as status.
// Timing: one idle cycle after start, then per partition one load cycle and
// 2**nbits pattern cycles, then one cycle to restore the C-register.
// The stepping order follows the test procedure of the method; the counter
// based pattern source, the configuration record and the timing are this
// design's own.
module self_test_seq
  import ctest_pkg::*;
#(
  parameter int unsigned NPART = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  part_cfg_t                 cfg [NPART],
  output logic                      creg_load,
  output logic [CREG_W-1:0]         creg_word,
  output logic [PW-1:0]             pat,
  output logic                      pat_valid,
  output logic [$clog2(NPART+1)-1:0] part,
  input  logic [RW-1:0]             resp,
  input  logic [RW-1:0]             expected,
  output logic                      busy,
  output logic                      done,
  output logic                      fail,
  output logic [15:0]               mismatches
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_RESTORE, S_DONE} state_t;

  state_t        state;
  logic [PW:0]   cnt;
  part_cfg_t     cur;
  logic [PW:0]   last;
  logic          mism;

  always_comb begin
    cur  = cfg[part];
    last = (PW+1)'((1 << cur.nbits) - 1);
    for (int k = 0; k < PW; k++) begin
      pat[k] = cur.src[k].use_cnt ? cnt[cur.src[k].idx] : cur.src[k].val;
    end
    pat_valid = (state == S_RUN);
    creg_load = (state == S_LOAD) || (state == S_RESTORE);
    creg_word = (state == S_LOAD) ? cur.creg : '0;
    busy      = (state != S_IDLE) && (state != S_DONE);
    done      = (state == S_DONE);
    mism      = pat_valid && (((resp ^ expected) & cur.cmp_mask) != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      part       <= '0;
      fail       <= 1'b0;
      mismatches <= '0;
    end else begin
      if (mism) begin
        fail <= 1'b1;
        if (mismatches != 16'hFFFF) mismatches <= mismatches + 16'd1;
      end
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_LOAD;
            part       <= '0;
            fail       <= 1'b0;
            mismatches <= '0;
          end
        end
        S_LOAD: begin
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (cnt == last) begin
            if (part == ($bits(part))'(NPART - 1)) begin
              state <= S_RESTORE;
            end else begin
              part  <= part + 1'b1;
              state <= S_LOAD;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RESTORE: state <= S_DONE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  // A partition may not ask for more patterns than the counter can give.
  // (The state register resets to S_IDLE, so no disable clause is needed.)
  a_nbits_in_range: assert property (@(posedge clk)
    (state == S_LOAD) |-> (cur.nbits <= (CNT_IDX_W+1)'(PW)));

endmodule
