// Self-checking testbench of the input classifier: loads a random class
// table, then reads random bytes (with random read enables and writes to
// the same entries in the same cycle) and checks that the class set of each
// read byte appears one cycle later and holds while no read is made.
module tb_bfsm_classifier;
  import bfsm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_chr = 0, rd_chr = 0;
  logic [NCLASS-1:0] wr_classes = 0, class_vec;
  logic [NCLASS-1:0] model [256];
  logic [NCLASS-1:0] expv;
  int checks = 0, failures = 0;
  bit primed = 0;

  bfsm_classifier dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      wr_en = 1; wr_chr = 8'(c); wr_classes = NCLASS'($urandom); model[c] = wr_classes;
    end
    @(negedge clk); wr_en = 0;
    expv = '0;
    for (int n = 0; n < 3000; n++) begin
      rd_en = $urandom_range(0, 2) != 0;
      rd_chr = 8'($urandom);
      wr_en = $urandom_range(0, 3) == 0;
      wr_chr = ($urandom_range(0, 1) == 0) ? rd_chr : 8'($urandom);
      wr_classes = NCLASS'($urandom);
      if (rd_en) begin expv = model[rd_chr]; primed = 1; end
      if (wr_en) model[wr_chr] = wr_classes;
      @(negedge clk);
      if (primed) checks++;
      if (primed && class_vec !== expv) begin
        failures++;
        if (failures < 5) $display("n=%0d got %h exp %h", n, class_vec, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
