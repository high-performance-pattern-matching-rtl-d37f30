// End-to-end testbench of the pattern-matching engine at its default size
// (12 dual-port rule memories, 24 B-FSM engines, two streams, 16 sessions).
//
// Every memory gets one of the example rule sets (strings, regular
// expressions, a counted repetition using a character class and a counter),
// with pattern IDs made unique per memory. Two streams carry four sessions
// each, switching between them at random; some sessions scan with a subset
// of the engines. The condition table sets location windows and
// order/distance rules, and a list of negated patterns is reported when the
// sessions end. A reference model (the prioritized rule interpreter per
// engine and session, followed by the condition rules) predicts every match
// result; per session, the results are compared as a set. The test counts
// how often each mechanism happened (stalls from the result path, session
// switches and restores, new sessions, engines left out by a subset,
// location and order rejections, accepted order rules, negation reports,
// counter and class matches) and fails if one never did.
module tb_pm_engine_top;
  import bfsm_pkg::*;
  import bfsm_tb_pkg::*;
  localparam int NM = 12, NE = 24, NS = 2, SESS_W = 4, NNEG = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] s_valid = 0, s_new = 0, s_ready;
  logic [NS-1:0][7:0] s_chr = 0;
  logic [NS-1:0][SESS_W-1:0] s_sess = 0;
  scan_cfg_t cfg = '0;
  logic alloc_wr_en = 0, subset_wr_en = 0, init_wr_en = 0;
  logic [4:0] alloc_eng = 0, init_eng = 0;
  logic [0:0] alloc_stream = 0;
  logic [SESS_W-1:0] subset_sess = 0;
  logic [NE-1:0] subset_mask = 0;
  ctx_t init_val = '0;
  logic ct_wr_en = 0, ct_report_en = 0, ct_loc_en = 0, ct_ord_en = 0;
  logic [OUT_W-1:0] ct_wr_id = 0, ct_prev_id = 0;
  logic [OFFS_W-1:0] ct_min_off = 0, ct_max_off = 0, ct_max_dist = 0;
  logic neg_wr_en = 0, neg_wr_valid = 0;
  logic [2:0] neg_wr_idx = 0;
  logic [OUT_W-1:0] neg_wr_id = 0;
  logic eos_req = 0;
  logic [SESS_W-1:0] eos_sess = 0;
  logic [OFFS_W-1:0] eos_off = 0;
  logic eos_ack, r_valid, r_neg, overflow, stall;
  logic [OUT_W-1:0] r_id;
  logic [SESS_W-1:0] r_sess;
  logic [OFFS_W-1:0] r_off;

  pm_engine_top dut (.*);

  typedef struct { bit rep, loc, ord; int mn, mx, prev, maxd; } cond_m_t;

  int checks = 0, failures = 0;
  int n_stall = 0, n_new = 0, n_restore = 0, n_skip = 0, n_loc_rej = 0, n_ord_rej = 0;
  int n_ord_ok = 0, n_neg = 0, n_ctr = 0, n_res = 0;
  string got[16][$], expd[16][$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n && r_valid) begin
    n_res++;
    got[r_sess].push_back($sformatf("%0d:%0d:%0d", r_id, r_off, r_neg));
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rule_list_t q[NM];
    bfsm_image im[NM];
    cond_m_t cnd[int];
    int neg_ids[NNEG];
    logic [NE-1:0] subset[16];
    int st[16][NE], ctr[16][NE][NCTR], off[16], last[16][int];
    bit known[16];
    int cur[NS];
    automatic string al[5] = '{"ABCX", "testingpa", "testingca", "ABCDEX", "ax0123 "};
    automatic string words[5][2] = '{'{"ABC", "AABC"}, '{"testesting", "pattesting"},
                                     '{"testcase", "testing"}, '{"ABBBC", "ABE"}, '{"a123x", "a1234x"}};
    string pend[NS];

    // ---- rule sets: memory m holds set m % 5, IDs offset by 16 * m ----
    for (int m = 0; m < NM; m++) begin
      q[m] = example_rules(m % 5);
      foreach (q[m][i]) if (q[m][i].out != 0) q[m][i].out += 16 * m;
      im[m] = new(q[m], 8 * m, (m % 5 == 3) ? 3 : 15);
      chk(im[m].ok, "bucket overflow");
    end
    @(negedge clk); rst_n = 1;
    cfg = '0; cfg.bcast = 1; cfg.rule_en = 1;
    for (int a = 0; a < 2**BASE_W; a++)
      for (int s = 0; s < RULES_PER_BUCKET; s++) begin
        cfg.addr = BASE_W'(a); cfg.slot = 2'(s); @(negedge clk);
      end
    cfg.rule_en = 0; cfg.cls_en = 1;
    for (int c = 0; c < 256; c++) begin cfg.chr = 8'(c); cfg.classes = class_of(c); @(negedge clk); end
    cfg = '0;
    for (int m = 0; m < NM; m++) begin
      cfg = '0; cfg.sel = 8'(m);
      foreach (im[m].slots[a])
        for (int s = 0; s < im[m].slots[a].size(); s++) begin
          cfg.rule_en = 1; cfg.addr = BASE_W'(a); cfg.slot = 2'(s); cfg.rule = im[m].slots[a][s];
          @(negedge clk);
        end
      cfg.rule_en = 0;
      for (int c = 0; c < 256; c++) begin
        cfg.dflt_en = 1; cfg.chr = 8'(c); cfg.rule = '0; cfg.rule.res = im[m].dflt[c];
        @(negedge clk);
      end
      cfg = '0;
    end
    for (int e = 0; e < NE; e++) begin
      init_wr_en = 1; init_eng = 5'(e); init_val = im[e / 2].init_ctx(); @(negedge clk);
    end
    init_wr_en = 0;
    // ---- sessions: 0..3 on stream 0, 8..11 on stream 1; two use a subset ----
    for (int k = 0; k < 16; k++) subset[k] = '1;
    subset[2] = 24'h0f0f0f; subset[9] = 24'hff00ff;
    foreach (subset[k]) begin
      subset_wr_en = 1; subset_sess = 4'(k); subset_mask = subset[k]; @(negedge clk);
    end
    subset_wr_en = 0;
    // ---- conditions ----
    for (int m = 0; m < NM; m++)
      for (int o = 1; o <= 5; o++) begin
        automatic int id = 16 * m + o;
        automatic cond_m_t c;
        c.rep = 1; c.loc = 0; c.ord = 0; c.mn = 0; c.mx = 0; c.prev = 0; c.maxd = 0;
        if (m == 1 && o == 1) begin c.loc = 1; c.mn = 100; c.mx = 900; end
        if (m == 6 && o == 2) begin c.ord = 1; c.prev = 16 * m + 1; c.maxd = 60; end
        if (m == 8 && o == 2) begin c.ord = 1; c.prev = 16 * m + 1; c.maxd = 40; end
        if (m == 7 && o == 1) c.rep = 0;
        cnd[id] = c;
        ct_wr_en = 1; ct_wr_id = OUT_W'(id); ct_report_en = c.rep; ct_loc_en = c.loc;
        ct_min_off = c.mn; ct_max_off = c.mx; ct_ord_en = c.ord; ct_prev_id = OUT_W'(c.prev);
        ct_max_dist = c.maxd;
        @(negedge clk);
      end
    ct_wr_en = 0;
    neg_ids = '{1, 16 * 4 + 5, 16 * 9 + 5, 16 * 3 + 1, 300, 301, 16 * 2 + 2, 16 * 11 + 2};
    for (int k = 0; k < NNEG; k++) begin
      neg_wr_en = 1; neg_wr_idx = 3'(k); neg_wr_valid = 1; neg_wr_id = OUT_W'(neg_ids[k]);
      @(negedge clk);
    end
    neg_wr_en = 0;
    // wait for the result path to finish clearing its tables
    while (stall) @(negedge clk);

    // ---- scan ----
    for (int k = 0; k < 16; k++) known[k] = 0;
    cur = '{0, 8};
    pend = '{"", ""};
    for (int n = 0; n < 8000; n++) begin
      for (int s = 0; s < NS; s++) begin
        // a burst of ABC in both streams makes many engines match at once
        automatic bit burst = (n % 2000) >= 1900;
        s_valid[s] = burst || $urandom_range(0, 9) != 0;
        if (burst && pend[s].len() == 0) pend[s] = "ABC";
        if ($urandom_range(0, 40) == 0) cur[s] = 8 * s + $urandom_range(0, 3);
        s_sess[s] = 4'(cur[s]);
        s_new[s] = !known[cur[s]];
        if (pend[s].len() == 0 && $urandom_range(0, 5) == 0)
          pend[s] = words[$urandom_range(0, 4)][$urandom_range(0, 1)];
        if (pend[s].len() > 0) s_chr[s] = pend[s][0];
        else begin
          automatic int a = $urandom_range(0, 4);
          s_chr[s] = al[a][$urandom_range(0, al[a].len() - 1)];
        end
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        if (s_valid[s] && !s_ready[s]) n_stall++;
        if (s_valid[s] && s_ready[s]) begin
          automatic int k = cur[s];
          if (pend[s].len() > 0) pend[s] = pend[s].substr(1, pend[s].len() - 1);
          if (!known[k]) begin
            known[k] = 1; n_new++; off[k] = 0;
            for (int e = 0; e < NE; e++) begin st[k][e] = 0; ctr[k][e] = '{default: 0}; end
          end else if (dut.u_ctl.switch_evt[s]) n_restore++;
          for (int e = 0; e < NE; e++) begin
            if (e % 2 != s) continue;
            if (!subset[k][e]) begin n_skip++; continue; end
            begin
              automatic int o = ref_step(q[e / 2], st[k][e], ctr[k][e], int'(s_chr[s]));
              if (o != 0) begin
                automatic cond_m_t c = cnd[o];
                automatic bit ok = c.rep;
                if ((e / 2) % 5 == 4) n_ctr++;
                if (c.loc && (off[k] < c.mn || off[k] > c.mx)) begin ok = 0; n_loc_rej++; end
                if (c.ord) begin
                  if (!last[k].exists(c.prev) || off[k] - last[k][c.prev] > c.maxd) begin
                    ok = 0; n_ord_rej++;
                  end else n_ord_ok++;
                end
                if (ok) expd[k].push_back($sformatf("%0d:%0d:0", o, off[k]));
                last[k][o] = off[k];
              end
            end
          end
          off[k]++;
        end
      end
      @(negedge clk);
    end
    s_valid = 0;
    repeat (100) @(negedge clk);
    // ---- end every session ----
    for (int k = 0; k < 16; k++) if (known[k]) begin
      for (int i = 0; i < NNEG; i++)
        if (!last[k].exists(neg_ids[i])) begin
          expd[k].push_back($sformatf("%0d:%0d:1", neg_ids[i], off[k]));
          n_neg++;
        end
      eos_req = 1; eos_sess = 4'(k); eos_off = off[k];
      #1;
      while (!eos_ack) begin @(negedge clk); #1; end
      @(negedge clk);
      eos_req = 0;
      repeat (NNEG + 2) @(negedge clk);
    end
    // ---- compare per session ----
    for (int k = 0; k < 16; k++) begin
      got[k].sort(); expd[k].sort();
      chk(got[k].size() == expd[k].size(),
          $sformatf("session %0d: %0d results, expected %0d", k, got[k].size(), expd[k].size()));
      for (int i = 0; i < got[k].size() && i < expd[k].size(); i++)
        chk(got[k][i] == expd[k][i], $sformatf("session %0d: got %s exp %s", k, got[k][i], expd[k][i]));
    end
    chk(!overflow, "result FIFO overflow");
    chk(n_stall > 0, "no stall"); chk(n_new > 0, "no new session");
    chk(n_restore > 0, "no session restore"); chk(n_skip > 0, "no subset skip");
    chk(n_loc_rej > 0, "no location rejection"); chk(n_ord_rej > 0, "no order rejection");
    chk(n_ord_ok > 0, "no order acceptance"); chk(n_neg > 0, "no negation report");
    chk(n_ctr > 0, "no counter-rule match");
    $display("results=%0d stalls=%0d new=%0d restores=%0d skips=%0d loc_rej=%0d ord_rej=%0d ord_ok=%0d neg=%0d ctr=%0d",
             n_res, n_stall, n_new, n_restore, n_skip, n_loc_rej, n_ord_rej, n_ord_ok, n_neg, n_ctr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
