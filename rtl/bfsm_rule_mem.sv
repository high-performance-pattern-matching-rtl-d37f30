// Dual-port transition rule memory shared by two B-FSM engines.
//
// Holds the BaRT-compressed rule tables of one B-FSM data structure: an
// array of buckets, each with RULES_PER_BUCKET rules stored in priority
// order, and a 256-entry default rule table indexed by the input byte that
// holds the result of the best wildcard-state rule for that byte. As in the
// FPGA implementation the document describes, the memory has two read
// ports, so two engines scanning two independent streams share one copy of
// the rules. Writes, used for incremental pattern updates, go through a
// separate port one rule (or one default entry) at a time; a dedicated
// write port is this design's choice.
//
// Timing: synchronous reads. With rd_en high at an edge, the port presents
// bucket[addr] and dflt[chr] from the next cycle and holds them while rd_en
// is low. A read and a write of the same entry at one edge return the old
// contents.
module bfsm_rule_mem
  import bfsm_pkg::*;
#(
  parameter int unsigned N_BUCKETS = 2**BASE_W
) (
  input  logic                                clk,
  // read port A
  input  logic                                a_rd_en,
  input  logic [BASE_W-1:0]                   a_addr,
  input  logic [CHAR_W-1:0]                   a_chr,
  output bucket_t                             a_bucket,
  output rule_result_t                        a_dflt,
  // read port B
  input  logic                                b_rd_en,
  input  logic [BASE_W-1:0]                   b_addr,
  input  logic [CHAR_W-1:0]                   b_chr,
  output bucket_t                             b_bucket,
  output rule_result_t                        b_dflt,
  // update port
  input  logic                                wr_rule_en,
  input  logic [BASE_W-1:0]                   wr_addr,
  input  logic [$clog2(RULES_PER_BUCKET)-1:0] wr_slot,
  input  rule_t                               wr_rule,
  input  logic                                wr_dflt_en,
  input  logic [CHAR_W-1:0]                   wr_chr,
  input  rule_result_t                        wr_dflt
);
  rule_t        rules_q [N_BUCKETS][RULES_PER_BUCKET];
  rule_result_t dflt_q  [2**CHAR_W];

  always_ff @(posedge clk) begin
    if (wr_rule_en) rules_q[wr_addr][wr_slot] <= wr_rule;
    if (wr_dflt_en) dflt_q[wr_chr] <= wr_dflt;
  end

  always_ff @(posedge clk) begin
    if (a_rd_en) begin
      for (int r = 0; r < RULES_PER_BUCKET; r++) a_bucket[r] <= rules_q[a_addr][r];
      a_dflt <= dflt_q[a_chr];
    end
    if (b_rd_en) begin
      for (int r = 0; r < RULES_PER_BUCKET; r++) b_bucket[r] <= rules_q[b_addr][r];
      b_dflt <= dflt_q[b_chr];
    end
  end
endmodule
