// Pattern-matching engine for intrusion detection.
//
// Detects all occurrences of thousands of strings and regular expressions
// in one or more byte streams at a fixed rate of one byte per cycle per
// stream, independent of the input and the number of patterns. Three
// hardware parts work together:
//   - scanner_control switches the engines between sessions, selects the
//     pattern subset of each session and allocates engines to streams;
//   - pattern_scanner runs N_MEM dual-port transition rule memories, each
//     shared by two B-FSM engines, with an input controller in front;
//   - result_processor collects the raw matches (pattern ID and offset),
//     applies location, order/distance and negation conditions and emits
//     the match results.
// The rule tables, condition table and all registers are written by a host
// running the pattern compiler; the engine only executes them.
//
// Interface: per stream a byte handshake (s_valid, s_chr, s_sess, s_new,
// s_ready); host write ports for rules/classes (cfg), engine allocation,
// session subsets, initial contexts, conditions and negated patterns; an
// end-of-session request; and the result stream r_*. Timing: a byte
// accepted at a clock edge produces its match result four cycles later if
// the result path is idle (two in the engine, one in the result FIFO, one
// in the condition stage).
module pm_engine_top
  import bfsm_pkg::*;
#(
  parameter int unsigned N_MEM     = 12,
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned SESS_W    = 4,
  parameter int unsigned N_NEG     = 8,
  localparam int unsigned N_ENG    = 2 * N_MEM,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned EW       = $clog2(N_ENG)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // input streams
  input  logic [N_STREAMS-1:0]              s_valid,
  input  logic [N_STREAMS-1:0][CHAR_W-1:0]  s_chr,
  input  logic [N_STREAMS-1:0][SESS_W-1:0]  s_sess,
  input  logic [N_STREAMS-1:0]              s_new,
  output logic [N_STREAMS-1:0]              s_ready,
  // rule memory and classifier updates
  input  scan_cfg_t                         cfg,
  // scanner control registers
  input  logic                              alloc_wr_en,
  input  logic [EW-1:0]                     alloc_eng,
  input  logic [SW-1:0]                     alloc_stream,
  input  logic                              subset_wr_en,
  input  logic [SESS_W-1:0]                 subset_sess,
  input  logic [N_ENG-1:0]                  subset_mask,
  input  logic                              init_wr_en,
  input  logic [EW-1:0]                     init_eng,
  input  ctx_t                              init_val,
  // result processor tables
  input  logic                              ct_wr_en,
  input  logic [OUT_W-1:0]                  ct_wr_id,
  input  logic                              ct_report_en,
  input  logic                              ct_loc_en,
  input  logic [OFFS_W-1:0]                 ct_min_off,
  input  logic [OFFS_W-1:0]                 ct_max_off,
  input  logic                              ct_ord_en,
  input  logic [OUT_W-1:0]                  ct_prev_id,
  input  logic [OFFS_W-1:0]                 ct_max_dist,
  input  logic                              neg_wr_en,
  input  logic [$clog2(N_NEG)-1:0]          neg_wr_idx,
  input  logic                              neg_wr_valid,
  input  logic [OUT_W-1:0]                  neg_wr_id,
  // end of session
  input  logic                              eos_req,
  input  logic [SESS_W-1:0]                 eos_sess,
  input  logic [OFFS_W-1:0]                 eos_off,
  output logic                              eos_ack,
  // results
  output logic                              r_valid,
  output logic [OUT_W-1:0]                  r_id,
  output logic [SESS_W-1:0]                 r_sess,
  output logic [OFFS_W-1:0]                 r_off,
  output logic                              r_neg,
  output logic                              overflow,
  output logic                              stall
);
  localparam int unsigned TAG_W = SESS_W + OFFS_W;

  logic [N_STREAMS-1:0]             off_load_en;
  logic [N_STREAMS-1:0][OFFS_W-1:0] off_load, off_cur;
  ctx_t [N_ENG-1:0]                 ctx_live, ctx_load, init_ctx;
  logic [N_ENG-1:0]                 ctx_load_en, eng_en;
  logic [N_ENG-1:0][SW-1:0]         eng_stream;
  logic [N_STREAMS-1:0]             switch_evt;
  logic [N_ENG-1:0]                 m_valid;
  logic [N_ENG-1:0][OUT_W-1:0]      m_id;
  logic [N_ENG-1:0][TAG_W-1:0]      m_tag;

  scanner_control #(.N_ENG(N_ENG), .N_STREAMS(N_STREAMS), .SESS_W(SESS_W)) u_ctl (
    .clk, .rst_n, .s_valid, .s_ready, .s_sess, .s_new,
    .off_cur, .off_load_en, .off_load, .ctx_live, .ctx_load_en, .ctx_load,
    .init_ctx, .eng_stream, .eng_en, .switch_evt,
    .alloc_wr_en, .alloc_eng, .alloc_stream, .subset_wr_en, .subset_sess,
    .subset_mask, .init_wr_en, .init_eng, .init_val);

  pattern_scanner #(.N_MEM(N_MEM), .N_STREAMS(N_STREAMS), .SESS_W(SESS_W)) u_scan (
    .clk, .rst_n, .stall, .s_valid, .s_chr, .s_sess, .s_ready,
    .off_load_en, .off_load, .off_cur, .eng_stream, .eng_en, .init_ctx,
    .ctx_load_en, .ctx_load, .ctx_live, .cfg, .m_valid, .m_id, .m_tag);

  result_processor #(.N_ENG(N_ENG), .SESS_W(SESS_W), .N_NEG(N_NEG)) u_res (
    .clk, .rst_n, .m_valid, .m_id, .m_tag, .stall_req(stall),
    .ct_wr_en, .ct_wr_id, .ct_report_en, .ct_loc_en, .ct_min_off, .ct_max_off,
    .ct_ord_en, .ct_prev_id, .ct_max_dist,
    .neg_wr_en, .neg_wr_idx, .neg_wr_valid, .neg_wr_id,
    .eos_req, .eos_sess, .eos_off, .eos_ack,
    .r_valid, .r_id, .r_sess, .r_off, .r_neg, .overflow);
endmodule
