// Self-checking testbench of one B-FSM engine with its rule memory.
//
// For five rule sets (the string examples ABC, testing/pattern and
// testing/testcase, the regular expressions AB[DE] and AB*C, and a counted
// repetition a\d{3}x using a character class and a counter) the rules are
// compiled into buckets, loaded through the memory's update port, and a
// random stream with embedded patterns is scanned. Every output is compared,
// cycle by cycle, with a reference interpreter of the prioritized rules; the
// check also pins the latency at two cycles and the rate at one byte per
// cycle. The stream is split into two sessions whose contexts are swapped
// through the engine's save/restore port at random points.
module tb_bfsm_engine;
  import bfsm_pkg::*;
  import bfsm_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctx_t init_ctx;
  logic in_valid = 0;
  logic [CHAR_W-1:0] in_chr = 0;
  logic [31:0] in_tag = 0;
  logic ctx_load_en = 0;
  ctx_t ctx_load, ctx_live;
  logic mem_rd_en;
  logic [BASE_W-1:0] mem_addr;
  logic [CHAR_W-1:0] mem_chr;
  bucket_t mem_bucket;
  rule_result_t mem_dflt;
  logic cls_wr_en = 0;
  logic [CHAR_W-1:0] cls_wr_chr = 0;
  logic [NCLASS-1:0] cls_wr_classes = 0;
  logic match_valid;
  logic [OUT_W-1:0] match_id;
  logic [31:0] match_tag;

  logic wr_rule_en = 0, wr_dflt_en = 0;
  logic [BASE_W-1:0] wr_addr = 0;
  logic [1:0] wr_slot = 0;
  rule_t wr_rule;
  logic [CHAR_W-1:0] wr_chr = 0;
  rule_result_t wr_dflt;

  bfsm_engine #(.TAG_W(32)) dut (
    .clk, .rst_n, .init_ctx, .in_valid, .in_chr, .in_tag, .ctx_load_en, .ctx_load,
    .ctx_live, .mem_rd_en, .mem_addr, .mem_chr, .mem_bucket, .mem_dflt,
    .cls_wr_en, .cls_wr_chr, .cls_wr_classes, .match_valid, .match_id, .match_tag);

  bfsm_rule_mem mem (
    .clk, .a_rd_en(mem_rd_en), .a_addr(mem_addr), .a_chr(mem_chr),
    .a_bucket(mem_bucket), .a_dflt(mem_dflt),
    .b_rd_en(1'b0), .b_addr('0), .b_chr('0), .b_bucket(), .b_dflt(),
    .wr_rule_en, .wr_addr, .wr_slot, .wr_rule, .wr_dflt_en, .wr_chr, .wr_dflt);

  int checks = 0, failures = 0, cyc = 0, n_match = 0, n_swap = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_image(bfsm_image im);
    @(negedge clk);
    wr_rule = '0;
    wr_rule_en = 1;
    for (int a = 0; a < 2**BASE_W; a++)
      for (int s = 0; s < RULES_PER_BUCKET; s++) begin
        wr_addr = BASE_W'(a); wr_slot = 2'(s);
        wr_rule = '0;
        if (im.slots.exists(a) && s < im.slots[a].size()) wr_rule = im.slots[a][s];
        @(negedge clk);
      end
    wr_rule_en = 0;
    wr_dflt_en = 1;
    for (int c = 0; c < 256; c++) begin
      wr_chr = CHAR_W'(c); wr_dflt = im.dflt[c];
      @(negedge clk);
    end
    wr_dflt_en = 0;
  endtask

  string alpha[5] = '{"ABCX", "testingpa", "testingca", "ABCDEX", "ax0123 "};
  string words[5][2] = '{'{"ABC", "AABC"}, '{"testesting", "pattesting"},
                         '{"testcase", "testing"}, '{"ABBBC", "ABE"}, '{"a123x", "a1234x"}};
  int masks[5] = '{15, 15, 15, 3, 15};
  int bases[5] = '{0, 16, 100, 200, 301};

  initial begin
    // classifier
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      cls_wr_en = 1; cls_wr_chr = CHAR_W'(c); cls_wr_classes = class_of(c);
    end
    @(negedge clk); cls_wr_en = 0;

    for (int set = 0; set < 5; set++) begin
      automatic rule_list_t q = example_rules(set);
      automatic bfsm_image im = new(q, bases[set], masks[set]);
      automatic int st[2] = '{0, 0};
      automatic int ctr[2][NCTR] = '{default: 0};
      automatic int cur = 0;
      automatic int exp_out[int];
      automatic int exp_tag[int];
      automatic ctx_t saved[2];
      automatic string pend = "";
      automatic int m0 = n_match;
      checks++;
      if (!im.ok) begin failures++; $display("set %0d: bucket overflow", set); end
      load_image(im);
      init_ctx = im.init_ctx();
      saved[0] = init_ctx; saved[1] = init_ctx;
      rst_n = 0; @(negedge clk); rst_n = 1;
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        // compare this cycle's output with the reference
        checks++;
        if (match_valid !== exp_out.exists(cyc) ||
            (match_valid && (match_id != OUT_W'(exp_out[cyc]) || match_tag != exp_tag[cyc]))) begin
          failures++;
          if (failures < 10)
            $display("set %0d cyc %0d: got v=%0d id=%0d tag=%0d exp v=%0d", set, cyc,
                     match_valid, match_id, match_tag, exp_out.exists(cyc));
        end
        if (match_valid) n_match++;
        // next stimulus
        ctx_load_en = 0;
        if (n > 2 && $urandom_range(0, 40) == 0) begin
          saved[cur] = ctx_live;
          cur ^= 1;
          ctx_load_en = 1; ctx_load = saved[cur];
          n_swap++;
        end
        in_valid = (n < 2990) && ($urandom_range(0, 4) != 0);
        if (in_valid) begin
          int c;
          int o;
          if (pend.len() == 0 && $urandom_range(0, 6) == 0)
            pend = words[set][$urandom_range(0, 1)];
          if (pend.len() > 0) begin
            c = pend[0]; pend = pend.substr(1, pend.len() - 1);
          end else c = alpha[set][$urandom_range(0, alpha[set].len() - 1)];
          in_chr = CHAR_W'(c);
          in_tag = n;
          o = ref_step(q, st[cur], ctr[cur], c);
          if (o != 0) begin exp_out[cyc + 2] = o; exp_tag[cyc + 2] = n; end
        end
      end
      in_valid = 0; ctx_load_en = 0;
      checks++;
      if (n_match - m0 < 10) begin
        failures++;
        $display("set %0d: only %0d matches", set, n_match - m0);
      end
    end
    checks++;
    if (n_match < 100 || n_swap < 20) begin
      failures++;
      $display("too few events: matches=%0d swaps=%0d", n_match, n_swap);
    end
    $display("matches=%0d swaps=%0d", n_match, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
