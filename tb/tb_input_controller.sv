// Self-checking testbench of the input controller: random allocations of
// six engines to two streams, random engine enables, stream bytes, stalls
// and offset restores; every engine's byte, valid and {session, offset} tag
// and every stream's ready and offset are compared with a model.
module tb_input_controller;
  import bfsm_pkg::*;
  localparam int NS = 2, NE = 6, SESS_W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall = 0;
  logic [NS-1:0] s_valid = 0, s_ready, off_load_en = 0;
  logic [NS-1:0][7:0] s_chr = 0;
  logic [NS-1:0][SESS_W-1:0] s_sess = 0;
  logic [NS-1:0][OFFS_W-1:0] off_load = 0, off_cur;
  logic [NE-1:0][0:0] eng_stream = 0;
  logic [NE-1:0] eng_en = 0, e_valid;
  logic [NE-1:0][7:0] e_chr;
  logic [NE-1:0][SESS_W+OFFS_W-1:0] e_tag;
  int off[NS];
  int checks = 0, failures = 0, n_stall = 0;

  input_controller #(.N_STREAMS(NS), .N_ENG(NE), .SESS_W(SESS_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    off = '{0, 0};
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(0, 50) == 0)
        for (int e = 0; e < NE; e++) eng_stream[e] = 1'($urandom);
      eng_en = NE'($urandom);
      stall = $urandom_range(0, 5) == 0;
      if (stall) n_stall++;
      for (int s = 0; s < NS; s++) begin
        s_valid[s] = $urandom_range(0, 3) != 0;
        s_chr[s] = 8'($urandom);
        s_sess[s] = 4'($urandom);
        off_load_en[s] = $urandom_range(0, 30) == 0;
        off_load[s] = $urandom_range(0, 1000);
        if (off_load_en[s]) off[s] = off_load[s];
      end
      #1;
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (s_ready[s] != !stall) failures++;
      end
      for (int e = 0; e < NE; e++) begin
        automatic int s = eng_stream[e];
        automatic bit v = eng_en[e] && s_valid[s] && !stall;
        checks++;
        if (e_valid[e] != v || (v && (e_chr[e] != s_chr[s] ||
            e_tag[e] != {s_sess[s], OFFS_W'(off[s])}))) begin
          failures++;
          if (failures < 5) $display("n=%0d e=%0d v=%0d tag=%h off=%0d", n, e, e_valid[e], e_tag[e], off[s]);
        end
      end
      for (int s = 0; s < NS; s++) if (s_valid[s] && !stall) off[s]++;
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (off_cur[s] != OFFS_W'(off[s])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
