// Result processor: turns raw pattern matches into match results.
//
// The engines report every occurrence of every pattern (pattern ID plus the
// {session, offset} of the byte that completed it). Many engines may report
// in the same cycle, so each engine has a small FIFO, and a round-robin
// arbiter forwards one event per cycle. The result processor then applies
// the pattern conditions the document lists, from a condition table indexed
// by pattern ID:
//   - location: the match must end at an offset within [min_off, max_off];
//   - order and distance: a pattern may require that another pattern
//     (prev_id) has already matched in the same session, at most max_dist
//     bytes earlier;
//   - negation: a negated pattern is reported when its session ends without
//     it having matched (the end of a session is signalled on eos_*).
// Matches of patterns without report_en only update the last-seen table
// (they are prerequisites of other patterns). The document lists these
// condition types and the output generation; the table format, the FIFOs,
// the arbiter and the small list of negated patterns are this design's.
//
// The last-seen table stores, per session and pattern ID, the latest match
// offset and an epoch number; ending a session advances its epoch, which
// invalidates all its entries at once. Epoch 0 is never used, and after
// reset the table is cleared to it, one entry per cycle, while stall_req
// holds the input. An entry left untouched for 255 ends of its session
// becomes valid again; this is a known limit of the epoch scheme.
//
// Timing: an engine event enters its FIFO at the clock edge; it can leave
// the next cycle and its result appears one cycle later. stall_req is high
// while any FIFO is within STALL_MARGIN entries of full; it must stop the
// input so that events already on their way still fit. eos_req is accepted
// (eos_ack) only when all FIFOs are empty; the negated-pattern list is then
// swept, one entry per cycle, before the next event is taken.
module result_processor
  import bfsm_pkg::*;
#(
  parameter int unsigned N_ENG        = 24,
  parameter int unsigned SESS_W       = 4,
  parameter int unsigned FIFO_DEPTH   = 8,
  parameter int unsigned STALL_MARGIN = 4,
  parameter int unsigned N_NEG        = 8,
  localparam int unsigned TAG_W       = SESS_W + OFFS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // raw matches from the engines
  input  logic [N_ENG-1:0]              m_valid,
  input  logic [N_ENG-1:0][OUT_W-1:0]   m_id,
  input  logic [N_ENG-1:0][TAG_W-1:0]   m_tag,
  output logic                          stall_req,
  // condition table update
  input  logic                          ct_wr_en,
  input  logic [OUT_W-1:0]              ct_wr_id,
  input  logic                          ct_report_en,
  input  logic                          ct_loc_en,
  input  logic [OFFS_W-1:0]             ct_min_off,
  input  logic [OFFS_W-1:0]             ct_max_off,
  input  logic                          ct_ord_en,
  input  logic [OUT_W-1:0]              ct_prev_id,
  input  logic [OFFS_W-1:0]             ct_max_dist,
  // negated-pattern list update
  input  logic                          neg_wr_en,
  input  logic [$clog2(N_NEG)-1:0]      neg_wr_idx,
  input  logic                          neg_wr_valid,
  input  logic [OUT_W-1:0]              neg_wr_id,
  // end of a session
  input  logic                          eos_req,
  input  logic [SESS_W-1:0]             eos_sess,
  input  logic [OFFS_W-1:0]             eos_off,
  output logic                          eos_ack,
  // match results
  output logic                          r_valid,
  output logic [OUT_W-1:0]              r_id,
  output logic [SESS_W-1:0]             r_sess,
  output logic [OFFS_W-1:0]             r_off,
  output logic                          r_neg,
  output logic                          overflow
);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);
  localparam int unsigned EW = (N_ENG > 1) ? $clog2(N_ENG) : 1;
  localparam int unsigned NW = $clog2(N_NEG);

  typedef struct packed {
    logic [OUT_W-1:0]  id;
    logic [TAG_W-1:0]  tag;
  } ev_t;

  typedef struct packed {
    logic              report_en;
    logic              loc_en;
    logic [OFFS_W-1:0] min_off;
    logic [OFFS_W-1:0] max_off;
    logic              ord_en;
    logic [OUT_W-1:0]  prev_id;
    logic [OFFS_W-1:0] max_dist;
  } cond_t;

  typedef struct packed {
    logic [7:0]        epoch;
    logic [OFFS_W-1:0] off;
  } seen_t;

  // ---------------- per-engine FIFOs ----------------
  ev_t            fifo_q  [N_ENG][FIFO_DEPTH];
  logic [FW-1:0]  rd_ptr  [N_ENG];
  logic [FW-1:0]  wr_ptr  [N_ENG];
  logic [FW:0]    count   [N_ENG];
  logic [N_ENG-1:0] nonempty, pop, push;
  logic             clr_q;       // last-seen table clear after reset
  logic [SESS_W+OUT_W-1:0] clr_idx_q;

  always_comb begin
    stall_req = 1'b0;
    for (int e = 0; e < N_ENG; e++) begin
      nonempty[e] = (count[e] != '0);
      if (count[e] >= (FW+1)'(FIFO_DEPTH - STALL_MARGIN)) stall_req = 1'b1;
    end
    if (clr_q) stall_req = 1'b1;
  end

  // ---------------- round-robin arbiter ----------------
  logic [EW-1:0] rr_q, grant;
  logic          grant_v;
  logic          sweeping;

  always_comb begin
    grant   = '0;
    grant_v = 1'b0;
    for (int k = N_ENG - 1; k >= 0; k--) begin
      int unsigned e;
      e = (int'(rr_q) + k) % N_ENG;
      if (nonempty[e]) begin
        grant   = EW'(e);
        grant_v = !sweeping && !clr_q;
      end
    end
    pop = '0;
    if (grant_v) pop[grant] = 1'b1;
    for (int e = 0; e < N_ENG; e++)
      push[e] = m_valid[e] && (count[e] != (FW+1)'(FIFO_DEPTH) || pop[e]);
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < N_ENG; e++)
      if (push[e]) fifo_q[e][wr_ptr[e]] <= '{id: m_id[e], tag: m_tag[e]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ENG; e++) begin
        rd_ptr[e] <= '0;
        wr_ptr[e] <= '0;
        count[e]  <= '0;
      end
      rr_q     <= '0;
      overflow <= 1'b0;
    end else begin
      for (int e = 0; e < N_ENG; e++) begin
        if (m_valid[e] && !push[e]) overflow <= 1'b1;
        if (push[e]) wr_ptr[e] <= wr_ptr[e] + 1'b1;
        if (pop[e]) rd_ptr[e] <= rd_ptr[e] + 1'b1;
        count[e] <= count[e] + (FW+1)'(push[e]) - (FW+1)'(pop[e]);
      end
      if (grant_v) rr_q <= (grant == EW'(N_ENG - 1)) ? '0 : grant + 1'b1;
    end
  end

  // ---------------- condition evaluation ----------------
  cond_t          cond_tbl [2**OUT_W];
  seen_t          seen_tbl [2**(SESS_W+OUT_W)];  // index {session, ID}
  logic [7:0]     epoch_q  [2**SESS_W];
  logic [N_NEG-1:0]            neg_v_q;
  logic [N_NEG-1:0][OUT_W-1:0] neg_id_q;

  always_ff @(posedge clk) begin
    if (ct_wr_en)
      cond_tbl[ct_wr_id] <= '{report_en: ct_report_en, loc_en: ct_loc_en,
                              min_off: ct_min_off, max_off: ct_max_off,
                              ord_en: ct_ord_en, prev_id: ct_prev_id,
                              max_dist: ct_max_dist};
  end

  ev_t               ev;
  logic [SESS_W-1:0] ev_sess;
  logic [OFFS_W-1:0] ev_off;
  cond_t             cnd;
  seen_t             prev;
  logic              loc_ok, ord_ok;

  always_comb begin
    ev      = fifo_q[grant][rd_ptr[grant]];
    ev_sess = ev.tag[TAG_W-1 -: SESS_W];
    ev_off  = ev.tag[OFFS_W-1:0];
    cnd     = cond_tbl[ev.id];
    prev    = seen_tbl[{ev_sess, cnd.prev_id}];
    loc_ok  = !cnd.loc_en || (ev_off >= cnd.min_off && ev_off <= cnd.max_off);
    ord_ok  = !cnd.ord_en ||
              (prev.epoch == epoch_q[ev_sess] && (ev_off - prev.off) <= cnd.max_dist);
  end

  // end-of-session sweep of the negated-pattern list
  logic [NW-1:0]     sw_idx_q;
  logic [SESS_W-1:0] sw_sess_q;
  logic [OFFS_W-1:0] sw_off_q;
  seen_t             sw_seen;

  assign eos_ack = eos_req && !sweeping && !clr_q && (nonempty == '0);
  assign sw_seen = seen_tbl[{sw_sess_q, neg_id_q[sw_idx_q]}];

  // after reset the last-seen table is cleared, one entry per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_q     <= 1'b1;
      clr_idx_q <= '0;
    end else if (clr_q) begin
      clr_idx_q <= clr_idx_q + 1'b1;
      if (clr_idx_q == '1) clr_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clr_q)
      seen_tbl[clr_idx_q] <= '0;
    else if (grant_v)
      seen_tbl[{ev_sess, ev.id}] <= '{epoch: epoch_q[ev_sess], off: ev_off};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2**SESS_W; s++) epoch_q[s] <= 8'd1;
      neg_v_q   <= '0;
      neg_id_q  <= '0;
      sweeping  <= 1'b0;
      sw_idx_q  <= '0;
      sw_sess_q <= '0;
      sw_off_q  <= '0;
      r_valid   <= 1'b0;
      r_id      <= '0;
      r_sess    <= '0;
      r_off     <= '0;
      r_neg     <= 1'b0;
    end else begin
      if (neg_wr_en) begin
        neg_v_q[neg_wr_idx]  <= neg_wr_valid;
        neg_id_q[neg_wr_idx] <= neg_wr_id;
      end
      r_valid <= 1'b0;
      if (grant_v) begin
        r_valid <= cnd.report_en && loc_ok && ord_ok;
        r_id    <= ev.id;
        r_sess  <= ev_sess;
        r_off   <= ev_off;
        r_neg   <= 1'b0;
      end else if (sweeping) begin
        r_valid <= neg_v_q[sw_idx_q] && (sw_seen.epoch != epoch_q[sw_sess_q]);
        r_id    <= neg_id_q[sw_idx_q];
        r_sess  <= sw_sess_q;
        r_off   <= sw_off_q;
        r_neg   <= 1'b1;
        sw_idx_q <= sw_idx_q + 1'b1;
        if (sw_idx_q == NW'(N_NEG - 1)) begin
          sweeping <= 1'b0;
          epoch_q[sw_sess_q] <= (epoch_q[sw_sess_q] == 8'hff) ? 8'd1
                                                              : epoch_q[sw_sess_q] + 8'd1;
        end
      end
      if (eos_ack) begin
        sweeping  <= 1'b1;
        sw_idx_q  <= '0;
        sw_sess_q <= eos_sess;
        sw_off_q  <= eos_off;
      end
    end
  end

  // no event may be lost: the stall margin must cover events in flight
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow);
endmodule
