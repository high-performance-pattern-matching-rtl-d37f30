// Input classifier of an enhanced B-FSM engine.
//
// Maps every input byte to a set of character classes (for example digits,
// alphanumerics, white space), so that one transition rule can test a whole
// class instead of a single byte. The class sets are programmable: a table
// of 256 entries holds one bit per class for each byte value, and a byte may
// belong to several classes. The document names the classifier and its
// purpose; the table organisation and its width are this design's choice.
//
// Interface: a write port (wr_en, wr_chr, wr_classes) loads the table.
// Timing: synchronous read. With rd_en high at a clock edge, class_vec shows
// the classes of rd_chr from the next cycle on and holds while rd_en is low.
// A write and a read of the same entry at one edge return the old entry.
module bfsm_classifier
  import bfsm_pkg::*;
#(
  parameter int unsigned N_CLASS = NCLASS
) (
  input  logic               clk,
  input  logic               wr_en,
  input  logic [CHAR_W-1:0]  wr_chr,
  input  logic [N_CLASS-1:0] wr_classes,
  input  logic               rd_en,
  input  logic [CHAR_W-1:0]  rd_chr,
  output logic [N_CLASS-1:0] class_vec
);
  logic [N_CLASS-1:0] table_q [2**CHAR_W];

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_chr] <= wr_classes;
  end

  always_ff @(posedge clk) begin
    if (rd_en) class_vec <= table_q[rd_chr];
  end
endmodule
