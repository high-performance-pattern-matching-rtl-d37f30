// Self-checking testbench of the dual-port transition rule memory: random
// rule and default-entry writes and random reads on both ports, compared
// with a model; reads appear one cycle after the request, hold while the
// port is idle, and a read of an entry written at the same edge returns the
// old contents.
module tb_bfsm_rule_mem;
  import bfsm_pkg::*;
  localparam int NB = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_rd_en = 0, b_rd_en = 0, wr_rule_en = 0, wr_dflt_en = 0;
  logic [BASE_W-1:0] a_addr = 0, b_addr = 0, wr_addr = 0;
  logic [7:0] a_chr = 0, b_chr = 0, wr_chr = 0;
  logic [1:0] wr_slot = 0;
  rule_t wr_rule;
  rule_result_t wr_dflt, a_dflt, b_dflt;
  bucket_t a_bucket, b_bucket;
  rule_t m_rules[NB][RULES_PER_BUCKET];
  rule_result_t m_dflt[256];
  bucket_t ea, eb;
  rule_result_t eda, edb;
  int checks = 0, failures = 0;

  bfsm_rule_mem #(.N_BUCKETS(NB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rule_t rnd_rule();
    logic [RULE_W-1:0] v;
    for (int i = 0; i < RULE_W; i += 32) v = {v, $urandom};
    return rule_t'(v);
  endfunction

  initial begin
    for (int a = 0; a < NB; a++)
      for (int s = 0; s < RULES_PER_BUCKET; s++) begin
        @(negedge clk);
        wr_rule_en = 1; wr_addr = BASE_W'(a); wr_slot = 2'(s); wr_rule = rnd_rule();
        m_rules[a][s] = wr_rule;
      end
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      wr_rule_en = 0; wr_dflt_en = 1; wr_chr = 8'(c); wr_dflt = rnd_rule().res;
      m_dflt[c] = wr_dflt;
    end
    @(negedge clk); wr_dflt_en = 0;
    for (int n = 0; n < 4000; n++) begin
      a_rd_en = $urandom_range(0, 2) != 0; b_rd_en = $urandom_range(0, 2) != 0;
      a_addr = BASE_W'($urandom_range(0, NB - 1)); b_addr = BASE_W'($urandom_range(0, NB - 1));
      a_chr = 8'($urandom); b_chr = 8'($urandom);
      wr_rule_en = $urandom_range(0, 2) == 0; wr_dflt_en = $urandom_range(0, 2) == 0;
      wr_addr = ($urandom_range(0, 1) == 0) ? a_addr : BASE_W'($urandom_range(0, NB - 1));
      wr_slot = 2'($urandom); wr_rule = rnd_rule();
      wr_chr = ($urandom_range(0, 1) == 0) ? b_chr : 8'($urandom); wr_dflt = rnd_rule().res;
      if (a_rd_en) begin
        for (int s = 0; s < RULES_PER_BUCKET; s++) ea[s] = m_rules[a_addr][s];
        eda = m_dflt[a_chr];
      end
      if (b_rd_en) begin
        for (int s = 0; s < RULES_PER_BUCKET; s++) eb[s] = m_rules[b_addr][s];
        edb = m_dflt[b_chr];
      end
      if (wr_rule_en) m_rules[wr_addr][wr_slot] = wr_rule;
      if (wr_dflt_en) m_dflt[wr_chr] = wr_dflt;
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (a_bucket !== ea || b_bucket !== eb || a_dflt !== eda || b_dflt !== edb) begin
          failures++;
          if (failures < 5) $display("n=%0d mismatch", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
