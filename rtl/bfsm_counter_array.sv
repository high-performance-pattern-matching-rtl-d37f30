// Counter array of an enhanced B-FSM engine.
//
// Transition rules carry a counter-control field (reset, load, increment,
// decrement) and their condition field can test counter status; together
// these let a small rule set express bounded repetitions such as "x{n}".
// This block holds the counters, applies the operation of the rule that was
// selected, and reports one status bit per counter: "counter is zero".
// The operation set follows the document; the counter count, width, the
// choice of "zero" as the status and saturation at both ends are this
// design's own.
//
// Interface: op_en/op/op_sel/op_val apply one operation per cycle at the
// clock edge; load_en overwrites all counters (session restore), and has
// priority over op_en. cnt is the present value of every counter, cnt_next
// the value after this cycle's operation, zero the status of cnt. Counters
// reset to zero. Timing: cnt and zero change one cycle after the operation.
module bfsm_counter_array
  import bfsm_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       op_en,
  input  ctr_op_e                    op,
  input  logic [$clog2(NCTR)-1:0]    op_sel,
  input  logic [CTR_W-1:0]           op_val,
  input  logic                       load_en,
  input  logic [NCTR-1:0][CTR_W-1:0] load_val,
  output logic [NCTR-1:0][CTR_W-1:0] cnt,
  output logic [NCTR-1:0][CTR_W-1:0] cnt_next,
  output logic [NCTR-1:0]            zero
);
  always_comb begin
    cnt_next = cnt;
    if (op_en) begin
      unique case (op)
        CTR_RST:  cnt_next[op_sel] = '0;
        CTR_LOAD: cnt_next[op_sel] = op_val;
        CTR_INC:  if (cnt[op_sel] != '1) cnt_next[op_sel] = cnt[op_sel] + 1'b1;
        CTR_DEC:  if (cnt[op_sel] != '0) cnt_next[op_sel] = cnt[op_sel] - 1'b1;
        default:  ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (load_en) cnt <= load_val;
    else              cnt <= cnt_next;
  end

  always_comb begin
    for (int i = 0; i < NCTR; i++) zero[i] = (cnt[i] == '0);
  end
endmodule
