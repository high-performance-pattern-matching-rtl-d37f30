// Self-checking testbench of the counter array: random reset, load,
// increment and decrement operations and whole-array loads are applied and
// the counters, the next values and the zero flags are compared with a
// model, including saturation at zero and at the maximum.
module tb_bfsm_counter_array;
  import bfsm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic op_en = 0, load_en = 0;
  ctr_op_e op = CTR_NOP;
  logic [$clog2(NCTR)-1:0] op_sel = 0;
  logic [CTR_W-1:0] op_val = 0;
  logic [NCTR-1:0][CTR_W-1:0] load_val = '0, cnt, cnt_next;
  logic [NCTR-1:0] zero;
  int model[NCTR], nxt[NCTR];
  int checks = 0, failures = 0, n_sat = 0;

  bfsm_counter_array dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '{default: 0};
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      op_en = $urandom_range(0, 4) != 0;
      op = ctr_op_e'($urandom_range(0, 4));
      op_sel = 2'($urandom);
      op_val = ($urandom_range(0, 3) == 0) ? 8'hfd : 8'($urandom_range(0, 3));
      load_en = $urandom_range(0, 50) == 0;
      for (int i = 0; i < NCTR; i++) load_val[i] = 8'($urandom_range(0, 2));
      nxt = model;
      if (op_en)
        case (op)
          CTR_RST:  nxt[op_sel] = 0;
          CTR_LOAD: nxt[op_sel] = op_val;
          CTR_INC:  if (model[op_sel] < 255) nxt[op_sel]++; else n_sat++;
          CTR_DEC:  if (model[op_sel] > 0) nxt[op_sel]--; else n_sat++;
          default: ;
        endcase
      #1;
      for (int i = 0; i < NCTR; i++) begin
        checks++;
        if (cnt_next[i] != 8'(nxt[i]) || cnt[i] != 8'(model[i]) || zero[i] != (model[i] == 0)) begin
          failures++;
          if (failures < 5) $display("n=%0d i=%0d cnt=%0d next=%0d exp %0d/%0d", n, i, cnt[i],
                                     cnt_next[i], model[i], nxt[i]);
        end
      end
      if (load_en) for (int i = 0; i < NCTR; i++) model[i] = load_val[i];
      else model = nxt;
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
