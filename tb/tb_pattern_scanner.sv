// Self-checking testbench of the pattern scanner with two dual-port rule
// memories (four engines) and two streams. Memory 0 holds the
// testing/pattern rules, memory 1 the regular expressions AB[DE] and AB*C,
// loaded through the update port (the clearing pass uses broadcast).
// Engine 2m scans stream 0 and engine 2m+1 stream 1, so both ports of every
// memory work at once and each stream is scanned by both rule sets. Every
// engine's match output is compared per cycle with a reference interpreter,
// including the {session, offset} tag and the two-cycle latency; random
// stalls and a reallocation of engines midway are applied.
module tb_pattern_scanner;
  import bfsm_pkg::*;
  import bfsm_tb_pkg::*;
  localparam int NM = 2, NE = 4, NS = 2, SESS_W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall = 0;
  logic [NS-1:0] s_valid = 0, s_ready, off_load_en = 0;
  logic [NS-1:0][7:0] s_chr = 0;
  logic [NS-1:0][SESS_W-1:0] s_sess = 0;
  logic [NS-1:0][OFFS_W-1:0] off_load = 0, off_cur;
  logic [NE-1:0][0:0] eng_stream;
  logic [NE-1:0] eng_en = '1, ctx_load_en = 0, m_valid;
  ctx_t [NE-1:0] init_ctx, ctx_load, ctx_live;
  scan_cfg_t cfg;
  logic [NE-1:0][OUT_W-1:0] m_id;
  logic [NE-1:0][SESS_W+OFFS_W-1:0] m_tag;

  pattern_scanner #(.N_MEM(NM), .N_STREAMS(NS), .SESS_W(SESS_W)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_match = 0, n_stall = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int m, bfsm_image im);
    cfg = '0;
    cfg.sel = 8'(m);
    foreach (im.slots[a])
      for (int s = 0; s < im.slots[a].size(); s++) begin
        cfg.rule_en = 1; cfg.addr = BASE_W'(a); cfg.slot = 2'(s); cfg.rule = im.slots[a][s];
        @(negedge clk);
      end
    cfg.rule_en = 0;
    for (int c = 0; c < 256; c++) begin
      cfg.dflt_en = 1; cfg.chr = 8'(c); cfg.rule = '0; cfg.rule.res = im.dflt[c];
      @(negedge clk);
    end
    cfg = '0;
  endtask

  initial begin
    rule_list_t q[NM];
    bfsm_image im[NM];
    int st[NE], ctr[NE][NCTR], off[NS];
    int exp_id[NE][int];
    longint exp_tag[NE][int];
    string al0 = "testingpattern", al1 = "ABBBCDE";
    q[0] = example_rules(1); q[1] = example_rules(3);
    im[0] = new(q[0], 0, 15); im[1] = new(q[1], 64, 3);
    for (int e = 0; e < NE; e++) begin
      init_ctx[e] = im[e / 2].init_ctx(); eng_stream[e] = 1'(e % 2);
      st[e] = 0; ctr[e] = '{default: 0};
    end
    off = '{0, 0};
    @(negedge clk); rst_n = 1;
    // clear all memories at once, then load each
    cfg = '0; cfg.bcast = 1; cfg.rule_en = 1;
    for (int a = 0; a < 2**BASE_W; a++)
      for (int s = 0; s < RULES_PER_BUCKET; s++) begin
        cfg.addr = BASE_W'(a); cfg.slot = 2'(s); @(negedge clk);
      end
    cfg.rule_en = 0; cfg.cls_en = 1;
    for (int c = 0; c < 256; c++) begin cfg.chr = 8'(c); cfg.classes = class_of(c); @(negedge clk); end
    cfg = '0;
    for (int m = 0; m < NM; m++) load(m, im[m]);
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      for (int e = 0; e < NE; e++) begin
        checks++;
        if (m_valid[e] !== exp_id[e].exists(cyc) ||
            (m_valid[e] && (m_id[e] != OUT_W'(exp_id[e][cyc]) || m_tag[e] != (SESS_W+OFFS_W)'(exp_tag[e][cyc])))) begin
          failures++;
          if (failures < 10) $display("cyc %0d e %0d: got %0d id=%0d tag=%h", cyc, e, m_valid[e], m_id[e], m_tag[e]);
        end
        if (m_valid[e]) n_match++;
      end
      if (n == 3000) begin
        // swap the engines of memory 1 between the streams, restarting them
        eng_stream[2] = 1; eng_stream[3] = 0;
        ctx_load_en = 4'b1100; ctx_load[2] = init_ctx[2]; ctx_load[3] = init_ctx[3];
        st[2] = 0; st[3] = 0;
      end else ctx_load_en = 0;
      stall = $urandom_range(0, 6) == 0;
      if (stall) n_stall++;
      for (int s = 0; s < NS; s++) begin
        s_valid[s] = (n < 5990) && $urandom_range(0, 3) != 0;
        s_chr[s] = $urandom_range(0, 3) == 0 ? "A" : ($urandom_range(0, 1) ? al0[$urandom_range(0, 13)] : al1[$urandom_range(0, 6)]);
        s_sess[s] = 4'(s + 5);
      end
      #1;
      for (int s = 0; s < NS; s++)
        if (s_valid[s] && s_ready[s]) begin
          for (int e = 0; e < NE; e++)
            if (eng_stream[e] == 1'(s)) begin
              automatic int o = ref_step(q[e / 2], st[e], ctr[e], s_chr[s]);
              if (o != 0) begin
                exp_id[e][cyc + 2] = o;
                exp_tag[e][cyc + 2] = {SESS_W'(s + 5), OFFS_W'(off[s])};
              end
            end
          off[s]++;
        end
    end
    checks++;
    if (n_match < 100 || n_stall == 0) failures++;
    $display("matches=%0d stalls=%0d", n_match, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
