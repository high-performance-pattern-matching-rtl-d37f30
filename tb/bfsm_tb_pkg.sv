// Testbench support for the B-FSM engine: the example pattern sets written as
// prioritized transition rules, a reference interpreter of such rules, and a
// small rule compiler that places them into hash-table buckets and a
// default-rule table.
//
// The reference interpreter works directly on the rule list: in every step
// it takes, among all rules whose state, input (or class) and counter
// condition match, the one with the highest priority (the earliest in the
// list on a tie). It knows nothing of buckets or hashing, so it checks the
// hardware's rule selector independently.
package bfsm_tb_pkg;
  import bfsm_pkg::*;

  typedef struct {
    bit      sw;    // state wildcard
    int      st;
    bit      iw;    // input wildcard
    bit      ic;    // input is a class number
    int      iv;
    bit      ce;    // counter condition enabled
    int      cs;
    bit      cz;
    int      nxt;
    int      prio;
    int      out;
    ctr_op_e op;
    int      osel;
    int      oval;
  } ref_rule_t;

  typedef ref_rule_t rule_list_t[$];

  // Character classes used by the tests: 0 digit, 1 word character, 2 space.
  function automatic logic [NCLASS-1:0] class_of(int c);
    logic [NCLASS-1:0] v = '0;
    v[0] = (c >= "0" && c <= "9");
    v[1] = v[0] || (c >= "a" && c <= "z") || (c >= "A" && c <= "Z") || c == "_";
    v[2] = (c == " " || c == 9 || c == 10 || c == 13);
    return v;
  endfunction

  function automatic ref_rule_t mk(bit sw, int st, bit iw, int iv, int nxt, int prio, int out = 0);
    ref_rule_t r;
    r = '{sw: sw, st: st, iw: iw, ic: 0, iv: iv, ce: 0, cs: 0, cz: 0,
          nxt: nxt, prio: prio, out: out, op: CTR_NOP, osel: 0, oval: 0};
    return r;
  endfunction

  // Rules for string patterns: "*,* -> S0" plus one chain per string.
  // set 0: ABC; 1: testing + pattern; 2: testing + testcase;
  // 3: regular expressions AB[DE] and AB*C; 4: a\d{3}x with a counter.
  function automatic rule_list_t example_rules(int set);
    rule_list_t q;
    ref_rule_t r;
    q.push_back(mk(1, 0, 1, 0, 0, 0));
    case (set)
      0: begin
        q.push_back(mk(1, 0, 0, "A", 1, 1));
        q.push_back(mk(0, 1, 0, "B", 2, 2));
        q.push_back(mk(0, 2, 0, "C", 3, 2, 1));
      end
      1: begin
        q.push_back(mk(1, 0, 0, "t", 1, 1));
        q.push_back(mk(0, 1, 0, "e", 2, 2));
        q.push_back(mk(0, 2, 0, "s", 3, 2));
        q.push_back(mk(0, 3, 0, "t", 4, 2));
        q.push_back(mk(0, 4, 0, "i", 5, 2));
        q.push_back(mk(0, 5, 0, "n", 6, 2));
        q.push_back(mk(0, 6, 0, "g", 7, 2, 1));
        q.push_back(mk(1, 0, 0, "p", 8, 1));
        q.push_back(mk(0, 8, 0, "a", 9, 2));
        q.push_back(mk(0, 9, 0, "t", 10, 2));
        q.push_back(mk(0, 10, 0, "t", 11, 2));
        q.push_back(mk(0, 11, 0, "e", 12, 2));
        q.push_back(mk(0, 12, 0, "r", 13, 2));
        q.push_back(mk(0, 13, 0, "n", 14, 2, 2));
        q.push_back(mk(0, 4, 0, "e", 2, 2));
        q.push_back(mk(0, 10, 0, "e", 2, 2));
        q.push_back(mk(0, 12, 0, "s", 3, 2));
      end
      2: begin
        q.push_back(mk(1, 0, 0, "t", 1, 1));
        q.push_back(mk(0, 1, 0, "e", 2, 2));
        q.push_back(mk(0, 2, 0, "s", 3, 2));
        q.push_back(mk(0, 3, 0, "t", 4, 2));
        q.push_back(mk(0, 4, 0, "i", 5, 2));
        q.push_back(mk(0, 5, 0, "n", 6, 2));
        q.push_back(mk(0, 6, 0, "g", 7, 2, 1));
        q.push_back(mk(0, 4, 0, "c", 8, 2));
        q.push_back(mk(0, 8, 0, "a", 9, 2));
        q.push_back(mk(0, 9, 0, "s", 10, 2));
        q.push_back(mk(0, 10, 0, "e", 11, 2, 2));
        q.push_back(mk(0, 4, 0, "e", 2, 2));
      end
      3: begin
        q.push_back(mk(1, 0, 0, "A", 1, 1));
        q.push_back(mk(0, 1, 0, "B", 2, 2));
        q.push_back(mk(0, 2, 0, "B", 4, 2));
        q.push_back(mk(0, 4, 0, "B", 4, 2));
        q.push_back(mk(0, 2, 0, "D", 3, 2, 1));
        q.push_back(mk(0, 2, 0, "E", 3, 2, 1));
        q.push_back(mk(0, 1, 0, "C", 5, 2, 2));
        q.push_back(mk(0, 2, 0, "C", 5, 2, 2));
        q.push_back(mk(0, 4, 0, "C", 5, 2, 2));
      end
      default: begin
        r = mk(1, 0, 0, "a", 1, 1);
        r.op = CTR_LOAD; r.osel = 1; r.oval = 3;
        q.push_back(r);
        r = mk(0, 1, 0, 0, 1, 2);   // digit while counter 1 is not zero
        r.ic = 1; r.ce = 1; r.cs = 1; r.cz = 0; r.op = CTR_DEC; r.osel = 1;
        q.push_back(r);
        r = mk(0, 1, 0, "x", 2, 2, 5);  // x once exactly three digits were seen
        r.ce = 1; r.cs = 1; r.cz = 1;
        q.push_back(r);
      end
    endcase
    return q;
  endfunction

  function automatic bit ref_hit(ref_rule_t r, int st, int c, int ctr[NCTR]);
    bit ok;
    ok = r.sw || (r.st == st);
    if (!r.iw) ok &= r.ic ? class_of(c)[r.iv] : (r.iv == c);
    if (r.ce) ok &= ((ctr[r.cs] == 0) == r.cz);
    return ok;
  endfunction

  // One reference transition; returns the output (0 = none).
  function automatic int ref_step(rule_list_t q, ref int st, ref int ctr[NCTR], input int c);
    int best = -1;
    for (int i = 0; i < q.size(); i++)
      if (ref_hit(q[i], st, c, ctr) && (best < 0 || q[i].prio > q[best].prio)) best = i;
    if (best < 0) return 0;
    st = q[best].nxt;
    case (q[best].op)
      CTR_RST:  ctr[q[best].osel] = 0;
      CTR_LOAD: ctr[q[best].osel] = q[best].oval;
      CTR_INC:  if (ctr[q[best].osel] < 255) ctr[q[best].osel]++;
      CTR_DEC:  if (ctr[q[best].osel] > 0) ctr[q[best].osel]--;
      default: ;
    endcase
    return q[best].out;
  endfunction

  function automatic rule_result_t to_res(ref_rule_t r, int base, int mask);
    rule_result_t x;
    x.next_state = STATE_W'(r.nxt);
    x.out        = OUT_W'(r.out);
    x.ctr_op     = r.op;
    x.ctr_sel    = $clog2(NCTR)'(r.osel);
    x.ctr_val    = CTR_W'(r.oval);
    x.next_base  = BASE_W'(base);
    x.next_mask  = IDX_W'(mask);
    return x;
  endfunction

  // Compiled image of one rule list: one table at base with the given mask.
  class bfsm_image;
    rule_t        slots[int][$];  // bucket address -> rules in priority order
    rule_result_t dflt[256];
    int           base, mask;
    bit           ok;

    function new(rule_list_t q, int base_i, int mask_i);
      int order[$];
      base = base_i; mask = mask_i; ok = 1;
      // default table: best wildcard-state rule for every byte
      for (int c = 0; c < 256; c++) begin
        int best = -1;
        for (int i = 0; i < q.size(); i++) begin
          int z[NCTR] = '{default: 0};
          if (q[i].sw && ref_hit(q[i], 0, c, z) && (best < 0 || q[i].prio > q[best].prio))
            best = i;
        end
        dflt[c] = to_res(q[best], base, mask);
      end
      // specific-state rules, highest priority first
      for (int p = 15; p >= 0; p--)
        for (int i = 0; i < q.size(); i++)
          if (!q[i].sw && q[i].prio == p) order.push_back(i);
      foreach (order[k]) begin
        ref_rule_t r = q[order[k]];
        rule_t     h;
        bit        used[int];
        h.valid = 1; h.state_wild = 0; h.cur_state = STATE_W'(r.st);
        h.in_wild = r.iw; h.in_class = r.ic; h.in_val = CHAR_W'(r.iv);
        h.cond_en = r.ce; h.cond_sel = $clog2(NCTR)'(r.cs); h.cond_zero = r.cz;
        h.res = to_res(r, base, mask);
        for (int c = 0; c < 256; c++) begin
          int z[NCTR] = '{default: 0};
          ref_rule_t t = r;
          t.ce = 0;
          if (ref_hit(t, r.st, c, z)) begin
            int a = int'(bucket_addr(BASE_W'(base), IDX_W'(mask), STATE_W'(r.st), CHAR_W'(c)));
            if (!used.exists(a)) begin
              used[a] = 1;
              slots[a].push_back(h);
              if (slots[a].size() > RULES_PER_BUCKET) ok = 0;
            end
          end
        end
      end
    endfunction

    function automatic ctx_t init_ctx();
      ctx_t x;
      x.state = '0; x.base = BASE_W'(base); x.mask = IDX_W'(mask); x.ctr = '0;
      return x;
    endfunction
  endclass

endpackage
