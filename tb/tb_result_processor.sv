// Self-checking testbench of the result processor. Four engines report
// matches of twenty pattern IDs with random location, order/distance and
// report settings; engine e carries session e, so each session's events
// keep their order and a per-session model gives the exact expected
// results. Engines stop two cycles after stall_req, as the real engines do,
// and bursts from all engines at once force the stall. Sessions are ended
// at random; the negated-pattern list must then report exactly the negated
// patterns that did not match in the session.
module tb_result_processor;
  import bfsm_pkg::*;
  localparam int NE = 4, SESS_W = 2, NNEG = 4, NID = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NE-1:0] m_valid = 0;
  logic [NE-1:0][OUT_W-1:0] m_id = 0;
  logic [NE-1:0][SESS_W+OFFS_W-1:0] m_tag = 0;
  logic stall_req;
  logic ct_wr_en = 0, ct_report_en = 0, ct_loc_en = 0, ct_ord_en = 0;
  logic [OUT_W-1:0] ct_wr_id = 0, ct_prev_id = 0;
  logic [OFFS_W-1:0] ct_min_off = 0, ct_max_off = 0, ct_max_dist = 0;
  logic neg_wr_en = 0, neg_wr_valid = 0;
  logic [1:0] neg_wr_idx = 0;
  logic [OUT_W-1:0] neg_wr_id = 0;
  logic eos_req = 0;
  logic [SESS_W-1:0] eos_sess = 0;
  logic [OFFS_W-1:0] eos_off = 0;
  logic eos_ack, r_valid, r_neg, overflow;
  logic [OUT_W-1:0] r_id;
  logic [SESS_W-1:0] r_sess;
  logic [OFFS_W-1:0] r_off;

  result_processor #(.N_ENG(NE), .SESS_W(SESS_W), .N_NEG(NNEG)) dut (.*);

  typedef struct { bit rep, loc, ord; int mn, mx, prev, maxd; } cond_m_t;
  typedef struct { int id, off; bit neg; } res_m_t;
  cond_m_t cnd[NID + 1];
  int neg_ids[NNEG];
  int last[NE][int];
  res_m_t expq[NE][$];
  int off[NE];
  int checks = 0, failures = 0;
  int n_stall = 0, n_loc_rej = 0, n_ord_rej = 0, n_ord_ok = 0, n_neg = 0, n_res = 0;
  logic stall_d1 = 1, stall_d2 = 1;
  bit gen = 0;

  always @(posedge clk) begin
    stall_d1 <= stall_req;
    stall_d2 <= stall_d1;
    if (rst_n && stall_req && gen) n_stall++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  // compare every result with the head of its session's queue
  always @(negedge clk) if (rst_n && r_valid) begin
    n_res++;
    if (expq[r_sess].size() == 0) chk(0, $sformatf("unexpected result id=%0d", r_id));
    else begin
      automatic res_m_t x = expq[r_sess].pop_front();
      chk(r_id == OUT_W'(x.id) && r_off == OFFS_W'(x.off) && r_neg == x.neg,
          $sformatf("sess %0d got id=%0d off=%0d neg=%0d exp id=%0d off=%0d neg=%0d",
                    r_sess, r_id, r_off, r_neg, x.id, x.off, x.neg));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of one event of session s
  function automatic void model_event(int s, int id, int o);
    cond_m_t c = cnd[id];
    bit ok = c.rep;
    if (c.loc && (o < c.mn || o > c.mx)) begin ok = 0; n_loc_rej++; end
    if (c.ord) begin
      if (!last[s].exists(c.prev) || o - last[s][c.prev] > c.maxd) begin ok = 0; n_ord_rej++; end
      else n_ord_ok++;
    end
    if (ok) expq[s].push_back('{id: id, off: o, neg: 0});
    last[s][id] = o;
  endfunction

  initial begin
    @(negedge clk); rst_n = 1;
    // condition table
    for (int id = 1; id <= NID; id++) begin
      cnd[id].rep = $urandom_range(0, 5) != 0;
      cnd[id].loc = $urandom_range(0, 2) == 0;
      cnd[id].mn = $urandom_range(0, 300);
      cnd[id].mx = cnd[id].mn + $urandom_range(0, 600);
      cnd[id].ord = $urandom_range(0, 2) == 0;
      cnd[id].prev = $urandom_range(1, NID);
      cnd[id].maxd = $urandom_range(0, 40);
      ct_wr_en = 1; ct_wr_id = OUT_W'(id); ct_report_en = cnd[id].rep; ct_loc_en = cnd[id].loc;
      ct_min_off = cnd[id].mn; ct_max_off = cnd[id].mx; ct_ord_en = cnd[id].ord;
      ct_prev_id = OUT_W'(cnd[id].prev); ct_max_dist = cnd[id].maxd;
      @(negedge clk);
    end
    ct_wr_en = 0;
    for (int k = 0; k < NNEG; k++) begin
      neg_ids[k] = NID + 1 + k;  // never-matching IDs plus some that do match
      if (k >= 2) neg_ids[k] = $urandom_range(1, NID);
      neg_wr_en = 1; neg_wr_idx = 2'(k); neg_wr_valid = 1; neg_wr_id = OUT_W'(neg_ids[k]);
      @(negedge clk);
    end
    neg_wr_en = 0;
    while (stall_req) @(negedge clk);
    off = '{0, 0, 0, 0};
    gen = 1;
    for (int n = 0; n < 20000; n++) begin
      automatic bit burst = (n % 500) < 40;
      for (int e = 0; e < NE; e++) begin
        m_valid[e] = !stall_d2 && ($urandom_range(0, burst ? 0 : 6) == 0);
        off[e] += $urandom_range(0, 6);
        if (m_valid[e]) begin
          automatic int id = $urandom_range(1, NID);
          m_id[e] = OUT_W'(id);
          m_tag[e] = {SESS_W'(e), OFFS_W'(off[e])};
          model_event(e, id, off[e]);
        end
      end
      @(negedge clk);
      // end a session now and then
      if (n % 1000 == 999) begin
        automatic int s = $urandom_range(0, NE - 1);
        m_valid = '0;
        @(negedge clk); @(negedge clk); @(negedge clk);
        for (int k = 0; k < NNEG; k++)
          if (!last[s].exists(neg_ids[k])) begin
            expq[s].push_back('{id: neg_ids[k], off: off[s], neg: 1});
            n_neg++;
          end
        eos_req = 1; eos_sess = SESS_W'(s); eos_off = off[s];
        #1;
        while (!eos_ack) begin @(negedge clk); #1; end
        @(negedge clk);
        eos_req = 0;
        last[s].delete();
        off[s] = 0;
      end
    end
    m_valid = '0;
    repeat (200) @(negedge clk);
    for (int s = 0; s < NE; s++) chk(expq[s].size() == 0, "missing results");
    chk(!overflow, "overflow");
    chk(n_stall > 0 && n_loc_rej > 0 && n_ord_rej > 0 && n_ord_ok > 0 && n_neg > 0,
        "a mechanism never happened");
    $display("results=%0d stalls=%0d loc_rej=%0d ord_rej=%0d ord_ok=%0d neg=%0d",
             n_res, n_stall, n_loc_rej, n_ord_rej, n_ord_ok, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
