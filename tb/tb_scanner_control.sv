// Self-checking testbench of the scanner control: two streams carry random
// sessions; the engines' live contexts and the stream offsets are random
// values driven by the testbench. On every session switch the block must
// restore exactly what was saved for the incoming session (or the initial
// context and offset zero for a new one), for exactly the engines allocated
// to that stream, and present the session's engine subset. Allocation,
// subsets and initial contexts are rewritten at random.
module tb_scanner_control;
  import bfsm_pkg::*;
  localparam int NE = 4, NS = 2, SESS_W = 2, NSESS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NS-1:0] s_valid = 0, s_ready = 0, s_new = 0, off_load_en, switch_evt;
  logic [NS-1:0][SESS_W-1:0] s_sess = 0;
  logic [NS-1:0][OFFS_W-1:0] off_cur = 0, off_load;
  ctx_t [NE-1:0] ctx_live, ctx_load, init_ctx;
  logic [NE-1:0] ctx_load_en, eng_en;
  logic [NE-1:0][0:0] eng_stream;
  logic alloc_wr_en = 0, subset_wr_en = 0, init_wr_en = 0;
  logic [1:0] alloc_eng = 0, init_eng = 0;
  logic [0:0] alloc_stream = 0;
  logic [SESS_W-1:0] subset_sess = 0;
  logic [NE-1:0] subset_mask = 0;
  ctx_t init_val;

  ctx_t m_ctx[NSESS][NE], m_init[NE];
  int m_off[NSESS];
  bit m_known[NSESS];
  int m_stream[NE];
  logic [NE-1:0] m_subset[NSESS];
  int cur[NS];
  bit cur_v[NS];
  int checks = 0, failures = 0, n_switch = 0, n_restore = 0;

  scanner_control #(.N_ENG(NE), .N_STREAMS(NS), .SESS_W(SESS_W)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctx_t rnd_ctx();
    return ctx_t'({$urandom, $urandom, $urandom});
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    for (int e = 0; e < NE; e++) begin m_stream[e] = e % NS; m_init[e] = '0; end
    for (int k = 0; k < NSESS; k++) begin m_subset[k] = '1; m_known[k] = 0; end
    cur_v = '{0, 0};
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      // host writes, not while a stream is between sessions of its own
      alloc_wr_en = 0; subset_wr_en = 0; init_wr_en = 0;
      if ($urandom_range(0, 200) == 0 && !cur_v[0] && !cur_v[1]) begin
        alloc_wr_en = 1; alloc_eng = 2'($urandom); alloc_stream = 1'($urandom);
      end
      if ($urandom_range(0, 20) == 0) begin
        subset_wr_en = 1; subset_sess = 2'($urandom); subset_mask = NE'($urandom);
      end
      if ($urandom_range(0, 20) == 0) begin
        init_wr_en = 1; init_eng = 2'($urandom); init_val = rnd_ctx();
      end
      for (int e = 0; e < NE; e++) ctx_live[e] = rnd_ctx();
      // streams: sessions 0,1 on stream 0 and 2,3 on stream 1
      for (int s = 0; s < NS; s++) begin
        s_valid[s] = $urandom_range(0, 2) != 0;
        s_ready[s] = $urandom_range(0, 5) != 0;
        s_sess[s]  = SESS_W'(2 * s + (($urandom_range(0, 7) == 0) ? 1 - cur[s] % 2 : cur[s] % 2));
        s_new[s]   = !m_known[s_sess[s]] || $urandom_range(0, 60) == 0;
        off_cur[s] = $urandom;
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        automatic bit sw = s_valid[s] && s_ready[s] && (s_new[s] || !cur_v[s] || s_sess[s] != cur[s]);
        chk(switch_evt[s] == sw && off_load_en[s] == sw, "switch flag");
        if (sw) begin
          n_switch++;
          if (!s_new[s]) n_restore++;
          chk(off_load[s] == (s_new[s] ? 0 : OFFS_W'(m_off[s_sess[s]])), "offset restore");
        end
      end
      for (int e = 0; e < NE; e++) begin
        int s;
        bit sw;
        s = m_stream[e];
        sw = switch_evt[s];
        chk(eng_stream[e] == 1'(s), "allocation");
        chk(eng_en[e] == m_subset[s_sess[s]][e], "subset");
        chk(ctx_load_en[e] == sw, "load enable");
        if (sw) chk(ctx_load[e] == (s_new[s] ? m_init[e] : m_ctx[s_sess[s]][e]), "context restore");
      end
      // model update at the edge
      for (int s = 0; s < NS; s++)
        if (switch_evt[s]) begin
          if (cur_v[s]) m_off[cur[s]] = off_cur[s];
          for (int e = 0; e < NE; e++)
            if (m_stream[e] == s && cur_v[s]) m_ctx[cur[s]][e] = ctx_live[e];
          cur[s] = s_sess[s]; cur_v[s] = 1;
          m_known[s_sess[s]] = 1;
        end
      if (alloc_wr_en) m_stream[alloc_eng] = alloc_stream;
      if (subset_wr_en) m_subset[subset_sess] = subset_mask;
      if (init_wr_en) m_init[init_eng] = init_val;
      @(negedge clk);
    end
    chk(n_switch > 100 && n_restore > 50, "too few session switches");
    $display("switches=%0d restores=%0d", n_switch, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
