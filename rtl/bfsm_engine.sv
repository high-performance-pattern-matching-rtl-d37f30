// B-FSM engine: state register and rule selector of one programmable
// state machine, with its input classifier and counter array.
//
// Each accepted input byte performs exactly one transition, whatever the
// input or the number of rules, which gives the deterministic scan rate the
// design is built for. In every transition the rule selector picks the
// highest-priority rule whose test part matches the current state, the
// input byte (or one of its character classes) and the counter conditions.
// It does so in one cycle: the hash info of the current state (table base
// and index mask) and the input select one bucket of the rule memory, the
// rules of that bucket are compared in parallel and the first match in
// bucket order wins; if none matches, the default rule of the input byte
// applies (this covers the wildcard-state rules of lower priority, down to
// the "any state, any input -> initial state" rule). The selected rule's
// result part gives the next state, the output (a pattern ID) and a counter
// operation, and its hash info names the table of the next state.
// The priority search and the hash-table organisation follow the document;
// the exact hash, the bucket size and the default table are this design's.
//
// Timing: in a cycle with in_valid high, the bucket for (next state, in_chr)
// is read, so the byte is accepted at that edge. Its rule is selected in the
// following cycle, and the resulting output appears on match_valid /
// match_id / match_tag one cycle after that (two cycles after acceptance).
// A byte can be accepted every cycle. in_tag travels with the byte.
//
// Context: ctx_live is the context after every accepted byte has been
// applied. ctx_load_en replaces the context in the same cycle (before the
// next byte's bucket is addressed), which allows a zero-cycle session switch:
// save ctx_live and load the new context at the same edge. After reset the
// context is init_ctx with all counters at zero.
module bfsm_engine
  import bfsm_pkg::*;
#(
  parameter int unsigned TAG_W = OFFS_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ctx_t                  init_ctx,
  // input byte
  input  logic                  in_valid,
  input  logic [CHAR_W-1:0]     in_chr,
  input  logic [TAG_W-1:0]      in_tag,
  // context save / restore
  input  logic                  ctx_load_en,
  input  ctx_t                  ctx_load,
  output ctx_t                  ctx_live,
  // rule memory port
  output logic                  mem_rd_en,
  output logic [BASE_W-1:0]     mem_addr,
  output logic [CHAR_W-1:0]     mem_chr,
  input  bucket_t               mem_bucket,
  input  rule_result_t          mem_dflt,
  // classifier table update
  input  logic                  cls_wr_en,
  input  logic [CHAR_W-1:0]     cls_wr_chr,
  input  logic [NCLASS-1:0]     cls_wr_classes,
  // output
  output logic                  match_valid,
  output logic [OUT_W-1:0]      match_id,
  output logic [TAG_W-1:0]      match_tag
);
  // state register: context in effect before the pending byte
  logic [STATE_W-1:0] state_q;
  logic [BASE_W-1:0]  base_q;
  logic [IDX_W-1:0]   mask_q;
  logic               pend_q;
  logic [CHAR_W-1:0]  chr_q;
  logic [TAG_W-1:0]   tag_q;

  logic [NCLASS-1:0]            class_vec;
  logic [NCTR-1:0][CTR_W-1:0]   cnt, cnt_next;
  logic [NCTR-1:0]              cnt_zero;

  bfsm_classifier u_cls (
    .clk       (clk),
    .wr_en     (cls_wr_en),
    .wr_chr    (cls_wr_chr),
    .wr_classes(cls_wr_classes),
    .rd_en     (in_valid),
    .rd_chr    (in_chr),
    .class_vec (class_vec)
  );

  // ---------------- rule selector ----------------
  function automatic logic rule_hit(input rule_t r, input logic [STATE_W-1:0] st,
                                    input logic [CHAR_W-1:0] c,
                                    input logic [NCLASS-1:0] cv,
                                    input logic [NCTR-1:0] z);
    logic s_ok, i_ok, c_ok;
    s_ok = r.state_wild || (r.cur_state == st);
    if (r.in_wild)       i_ok = 1'b1;
    else if (r.in_class) i_ok = cv[r.in_val[$clog2(NCLASS)-1:0]];
    else                 i_ok = (r.in_val == c);
    c_ok = !r.cond_en || (z[r.cond_sel] == r.cond_zero);
    return r.valid && s_ok && i_ok && c_ok;
  endfunction

  rule_result_t sel_res;
  always_comb begin
    sel_res = mem_dflt;
    for (int r = RULES_PER_BUCKET - 1; r >= 0; r--) begin
      if (rule_hit(mem_bucket[r], state_q, chr_q, class_vec, cnt_zero))
        sel_res = mem_bucket[r].res;
    end
  end

  // context after the pending byte
  always_comb begin
    ctx_live.state = pend_q ? sel_res.next_state : state_q;
    ctx_live.base  = pend_q ? sel_res.next_base  : base_q;
    ctx_live.mask  = pend_q ? sel_res.next_mask  : mask_q;
    ctx_live.ctr   = cnt_next;
  end

  ctx_t ctx_next;
  assign ctx_next = ctx_load_en ? ctx_load : ctx_live;

  // hash of the next state and the new byte addresses the rule memory
  assign mem_rd_en = in_valid;
  assign mem_chr   = in_chr;
  assign mem_addr  = bucket_addr(ctx_next.base, ctx_next.mask, ctx_next.state, in_chr);

  bfsm_counter_array u_ctr (
    .clk     (clk),
    .rst_n   (rst_n),
    .op_en   (pend_q),
    .op      (sel_res.ctr_op),
    .op_sel  (sel_res.ctr_sel),
    .op_val  (sel_res.ctr_val),
    .load_en (ctx_load_en),
    .load_val(ctx_load.ctr),
    .cnt     (cnt),
    .cnt_next(cnt_next),
    .zero    (cnt_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= init_ctx.state;
      base_q      <= init_ctx.base;
      mask_q      <= init_ctx.mask;
      pend_q      <= 1'b0;
      chr_q       <= '0;
      tag_q       <= '0;
      match_valid <= 1'b0;
      match_id    <= '0;
      match_tag   <= '0;
    end else begin
      state_q     <= ctx_next.state;
      base_q      <= ctx_next.base;
      mask_q      <= ctx_next.mask;
      pend_q      <= in_valid;
      if (in_valid) begin
        chr_q <= in_chr;
        tag_q <= in_tag;
      end
      match_valid <= pend_q && (sel_res.out != '0);
      match_id    <= sel_res.out;
      match_tag   <= tag_q;
    end
  end
endmodule
