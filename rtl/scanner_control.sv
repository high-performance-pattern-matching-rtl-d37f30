// Scanner control: session management, pattern subset selection and
// allocation of B-FSM engines to input streams.
//
// A stream may carry many interleaved sessions (for example TCP flows).
// Each input byte comes with the number of its session; when a stream
// moves to another session, the scanner control saves the context of
// every engine allocated to that stream (state, hash-table base and mask,
// counters) and the stream offset into the session table, and loads the
// context of the new session, in the same cycle as the new session's first
// byte, so a switch costs no cycles. A byte flagged s_new starts a session
// from the engines' initial contexts and offset zero. Each session also
// selects the subset of engines (and with them pattern subsets) that scan
// it; the other engines of the stream skip its bytes. The document names
// these three functions and places the session state in a memory of its
// own; the table layout, the zero-cycle swap and the register map are this
// design's.
//
// Host interface: alloc_* sets which stream an engine scans (after reset
// engine e scans stream e mod N_STREAMS, so the two engines of one
// dual-port memory scan different streams), subset_* writes a session's
// engine mask (all engines after reset), init_* an engine's initial
// context (zero after reset). A session must be active on one stream at a
// time.
module scanner_control
  import bfsm_pkg::*;
#(
  parameter int unsigned N_ENG     = 24,
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned SESS_W    = 4,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1,
  localparam int unsigned EW       = (N_ENG > 1) ? $clog2(N_ENG) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // stream side
  input  logic [N_STREAMS-1:0]              s_valid,
  input  logic [N_STREAMS-1:0]              s_ready,
  input  logic [N_STREAMS-1:0][SESS_W-1:0]  s_sess,
  input  logic [N_STREAMS-1:0]              s_new,
  // scanner side
  input  logic [N_STREAMS-1:0][OFFS_W-1:0]  off_cur,
  output logic [N_STREAMS-1:0]              off_load_en,
  output logic [N_STREAMS-1:0][OFFS_W-1:0]  off_load,
  input  ctx_t [N_ENG-1:0]                  ctx_live,
  output logic [N_ENG-1:0]                  ctx_load_en,
  output ctx_t [N_ENG-1:0]                  ctx_load,
  output ctx_t [N_ENG-1:0]                  init_ctx,
  output logic [N_ENG-1:0][SW-1:0]          eng_stream,
  output logic [N_ENG-1:0]                  eng_en,
  output logic [N_STREAMS-1:0]              switch_evt,
  // host configuration
  input  logic                              alloc_wr_en,
  input  logic [EW-1:0]                     alloc_eng,
  input  logic [SW-1:0]                     alloc_stream,
  input  logic                              subset_wr_en,
  input  logic [SESS_W-1:0]                 subset_sess,
  input  logic [N_ENG-1:0]                  subset_mask,
  input  logic                              init_wr_en,
  input  logic [EW-1:0]                     init_eng,
  input  ctx_t                              init_val
);
  localparam int unsigned N_SESS = 2**SESS_W;

  ctx_t              ctx_tbl    [N_SESS][N_ENG];
  logic [OFFS_W-1:0] off_tbl    [N_SESS];
  logic [N_ENG-1:0]  subset_q   [N_SESS];
  logic [N_STREAMS-1:0][SESS_W-1:0] cur_sess_q;
  logic [N_STREAMS-1:0]             cur_v_q;

  always_comb begin
    for (int s = 0; s < N_STREAMS; s++) begin
      switch_evt[s]  = s_valid[s] && s_ready[s] &&
                       (s_new[s] || !cur_v_q[s] || s_sess[s] != cur_sess_q[s]);
      off_load_en[s] = switch_evt[s];
      off_load[s]    = s_new[s] ? '0 : off_tbl[s_sess[s]];
    end
    for (int e = 0; e < N_ENG; e++) begin
      ctx_load_en[e] = switch_evt[eng_stream[e]];
      ctx_load[e]    = s_new[eng_stream[e]] ? init_ctx[e] : ctx_tbl[s_sess[eng_stream[e]]][e];
      eng_en[e]      = subset_q[s_sess[eng_stream[e]]][e];
    end
  end

  // session table: save the outgoing session
  always_ff @(posedge clk) begin
    for (int s = 0; s < N_STREAMS; s++)
      if (switch_evt[s] && cur_v_q[s]) off_tbl[cur_sess_q[s]] <= off_cur[s];
    for (int e = 0; e < N_ENG; e++)
      if (switch_evt[eng_stream[e]] && cur_v_q[eng_stream[e]])
        ctx_tbl[cur_sess_q[eng_stream[e]]][e] <= ctx_live[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_sess_q <= '0;
      cur_v_q    <= '0;
      for (int e = 0; e < N_ENG; e++) begin
        eng_stream[e] <= SW'(e % N_STREAMS);
        init_ctx[e]   <= '0;
      end
      for (int k = 0; k < N_SESS; k++) subset_q[k] <= '1;
    end else begin
      for (int s = 0; s < N_STREAMS; s++)
        if (switch_evt[s]) begin
          cur_sess_q[s] <= s_sess[s];
          cur_v_q[s]    <= 1'b1;
        end
      if (alloc_wr_en)  eng_stream[alloc_eng] <= alloc_stream;
      if (subset_wr_en) subset_q[subset_sess] <= subset_mask;
      if (init_wr_en)   init_ctx[init_eng]    <= init_val;
    end
  end
endmodule
