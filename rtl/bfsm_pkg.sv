// Shared types and constants of the B-FSM pattern-matching engine.
//
// A B-FSM is a programmable state machine whose transitions are stored as
// "transition rules" in a memory. A rule has a test part (current state,
// input byte or character class, counter conditions, each with wildcards)
// and a result part (next state, output, counter control and hash
// information for the next state). The field list follows the rule-vector
// picture of the enhanced B-FSM; all widths are this design's own choice.
//
// Rules of a state cluster are stored in a hash table. The hash info of a
// rule gives the base address and index mask of the table in which the rules
// of the next state live. The bucket index is the BaRT-style simplified
// hash  idx = (state & mask) | (input & ~mask)  on the low IDX_W bits, so
// every index bit is taken either from the state or from the input.
// Rules inside a bucket are kept in priority order; a per-byte default rule
// table supplies the lower-priority rules whose state is a wildcard.
package bfsm_pkg;

  localparam int unsigned CHAR_W   = 8;   // one input byte per transition
  localparam int unsigned STATE_W  = 8;   // state code within a cluster
  localparam int unsigned IDX_W    = 4;   // hash index bits per table
  localparam int unsigned BASE_W   = 9;   // bucket address width (512 buckets)
  localparam int unsigned OUT_W    = 12;  // output = pattern ID, 0 = none
  localparam int unsigned NCTR     = 4;   // counters per engine
  localparam int unsigned CTR_W    = 8;   // counter width
  localparam int unsigned NCLASS   = 8;   // character classes per engine
  localparam int unsigned RULES_PER_BUCKET = 4;
  localparam int unsigned OFFS_W   = 32;  // stream offset width

  typedef enum logic [2:0] {
    CTR_NOP  = 3'd0,
    CTR_RST  = 3'd1,
    CTR_LOAD = 3'd2,
    CTR_INC  = 3'd3,
    CTR_DEC  = 3'd4
  } ctr_op_e;

  // Result part of a rule: everything that becomes true after the transition.
  typedef struct packed {
    logic [STATE_W-1:0]      next_state;
    logic [OUT_W-1:0]        out;        // pattern ID, 0 = no output
    ctr_op_e                 ctr_op;
    logic [$clog2(NCTR)-1:0] ctr_sel;
    logic [CTR_W-1:0]        ctr_val;    // value for CTR_LOAD
    logic [BASE_W-1:0]       next_base;  // hash info: table base address
    logic [IDX_W-1:0]        next_mask;  // hash info: 1 = index bit from state
  } rule_result_t;

  // Full transition rule as stored in a bucket.
  typedef struct packed {
    logic                    valid;
    logic                    state_wild; // 1 = matches any state
    logic [STATE_W-1:0]      cur_state;
    logic                    in_wild;    // 1 = matches any input
    logic                    in_class;   // 1 = in_val[2:0] names a class
    logic [CHAR_W-1:0]       in_val;
    logic                    cond_en;    // test a counter status
    logic [$clog2(NCTR)-1:0] cond_sel;
    logic                    cond_zero;  // required value of "counter == 0"
    rule_result_t            res;
  } rule_t;

  localparam int unsigned RULE_W   = $bits(rule_t);

  typedef rule_t [RULES_PER_BUCKET-1:0] bucket_t;

  // State context of one engine: what must be saved and restored when a
  // stream switches between sessions.
  typedef struct packed {
    logic [STATE_W-1:0]            state;
    logic [BASE_W-1:0]             base;
    logic [IDX_W-1:0]              mask;
    logic [NCTR-1:0][CTR_W-1:0]    ctr;
  } ctx_t;

  // Update command for the rule memories and classifier tables. sel names a
  // rule memory (rule_en, dflt_en) or an engine (cls_en); bcast writes all.
  // A default-table write takes its data from rule.res.
  typedef struct packed {
    logic                                rule_en;
    logic                                dflt_en;
    logic                                cls_en;
    logic                                bcast;
    logic [7:0]                          sel;
    logic [BASE_W-1:0]                   addr;
    logic [$clog2(RULES_PER_BUCKET)-1:0] slot;
    logic [CHAR_W-1:0]                   chr;
    rule_t                               rule;
    logic [NCLASS-1:0]                   classes;
  } scan_cfg_t;

  // Bucket address of (state, input) in the table named by base/mask.
  function automatic logic [BASE_W-1:0] bucket_addr(
      input logic [BASE_W-1:0]  base,
      input logic [IDX_W-1:0]   mask,
      input logic [STATE_W-1:0] state,
      input logic [CHAR_W-1:0]  chr);
    logic [IDX_W-1:0] idx;
    idx = (state[IDX_W-1:0] & mask) | (chr[IDX_W-1:0] & ~mask);
    return base + BASE_W'(idx);
  endfunction

endpackage
