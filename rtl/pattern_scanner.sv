// Pattern scanner: input controller and an array of B-FSM engines.
//
// The patterns are spread over several B-FSMs, each holding one pattern
// subset in its own transition rule memory; smaller memories are faster and
// the distribution keeps the rule count per character low. As in the FPGA
// implementation the document describes, every rule memory is dual-ported
// and serves two engines: engine 2m reads port A and engine 2m+1 port B of
// memory m, so one copy of the rules scans two independent streams, one
// byte per cycle each. Which stream an engine scans is programmable.
//
// Interface: byte streams with valid/ready (see input_controller); per
// engine a context save/restore port and an initial context; a single
// update port (scan_cfg_t) that writes one rule, one default entry or one
// classifier entry per cycle into one memory/engine or, with bcast, into
// all; and per engine a match output (pattern ID and {session, offset} tag),
// two cycles after the byte was accepted.
module pattern_scanner
  import bfsm_pkg::*;
#(
  parameter int unsigned N_MEM     = 12,
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned SESS_W    = 4,
  localparam int unsigned N_ENG    = 2 * N_MEM,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned TAG_W    = SESS_W + OFFS_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              stall,
  input  logic [N_STREAMS-1:0]              s_valid,
  input  logic [N_STREAMS-1:0][CHAR_W-1:0]  s_chr,
  input  logic [N_STREAMS-1:0][SESS_W-1:0]  s_sess,
  output logic [N_STREAMS-1:0]              s_ready,
  input  logic [N_STREAMS-1:0]              off_load_en,
  input  logic [N_STREAMS-1:0][OFFS_W-1:0]  off_load,
  output logic [N_STREAMS-1:0][OFFS_W-1:0]  off_cur,
  input  logic [N_ENG-1:0][SW-1:0]          eng_stream,
  input  logic [N_ENG-1:0]                  eng_en,
  input  ctx_t [N_ENG-1:0]                  init_ctx,
  input  logic [N_ENG-1:0]                  ctx_load_en,
  input  ctx_t [N_ENG-1:0]                  ctx_load,
  output ctx_t [N_ENG-1:0]                  ctx_live,
  input  scan_cfg_t                         cfg,
  output logic [N_ENG-1:0]                  m_valid,
  output logic [N_ENG-1:0][OUT_W-1:0]       m_id,
  output logic [N_ENG-1:0][TAG_W-1:0]       m_tag
);
  logic [N_ENG-1:0]              e_valid;
  logic [N_ENG-1:0][CHAR_W-1:0]  e_chr;
  logic [N_ENG-1:0][TAG_W-1:0]   e_tag;

  input_controller #(.N_STREAMS(N_STREAMS), .N_ENG(N_ENG), .SESS_W(SESS_W)) u_ictl (
    .clk, .rst_n, .stall, .s_valid, .s_chr, .s_sess, .s_ready,
    .off_load_en, .off_load, .off_cur, .eng_stream, .eng_en,
    .e_valid, .e_chr, .e_tag);

  logic [N_ENG-1:0]              rd_en;
  logic [N_ENG-1:0][BASE_W-1:0]  rd_addr;
  logic [N_ENG-1:0][CHAR_W-1:0]  rd_chr;
  bucket_t      [N_ENG-1:0]      rd_bucket;
  rule_result_t [N_ENG-1:0]      rd_dflt;

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    logic sel_m;
    assign sel_m = cfg.bcast || (cfg.sel == 8'(m));
    bfsm_rule_mem u_mem (
      .clk,
      .a_rd_en(rd_en[2*m]),     .a_addr(rd_addr[2*m]),     .a_chr(rd_chr[2*m]),
      .a_bucket(rd_bucket[2*m]), .a_dflt(rd_dflt[2*m]),
      .b_rd_en(rd_en[2*m+1]),   .b_addr(rd_addr[2*m+1]),   .b_chr(rd_chr[2*m+1]),
      .b_bucket(rd_bucket[2*m+1]), .b_dflt(rd_dflt[2*m+1]),
      .wr_rule_en(cfg.rule_en && sel_m), .wr_addr(cfg.addr), .wr_slot(cfg.slot),
      .wr_rule(cfg.rule),
      .wr_dflt_en(cfg.dflt_en && sel_m), .wr_chr(cfg.chr), .wr_dflt(cfg.rule.res));
  end

  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    bfsm_engine #(.TAG_W(TAG_W)) u_eng (
      .clk, .rst_n,
      .init_ctx   (init_ctx[e]),
      .in_valid   (e_valid[e]),
      .in_chr     (e_chr[e]),
      .in_tag     (e_tag[e]),
      .ctx_load_en(ctx_load_en[e]),
      .ctx_load   (ctx_load[e]),
      .ctx_live   (ctx_live[e]),
      .mem_rd_en  (rd_en[e]),
      .mem_addr   (rd_addr[e]),
      .mem_chr    (rd_chr[e]),
      .mem_bucket (rd_bucket[e]),
      .mem_dflt   (rd_dflt[e]),
      .cls_wr_en  (cfg.cls_en && (cfg.bcast || cfg.sel == 8'(e))),
      .cls_wr_chr (cfg.chr),
      .cls_wr_classes(cfg.classes),
      .match_valid(m_valid[e]),
      .match_id   (m_id[e]),
      .match_tag  (m_tag[e]));
  end
endmodule
