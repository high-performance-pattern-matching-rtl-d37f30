// Input controller of the pattern scanner.
//
// Feeds the input streams to the B-FSM engines. Every engine is allocated
// to one stream (eng_stream) and may be switched off (eng_en, which carries
// the pattern subset chosen for the stream's present session); an enabled
// engine sees every byte its stream delivers, in the same cycle as all
// other engines of that stream, so each byte is scanned by all pattern
// subsets in parallel. The controller also numbers the bytes of each
// stream: the offset of a byte travels with it to the engines as a tag
// {session, offset} and comes back with every match. off_cur is the offset
// the next byte of each stream will get; off_load_en/off_load replace it in
// the same cycle, so a session switch can save and restore offsets.
// The document names the block and the programmable allocation of engines
// to streams; the handshake, the tag and the offset counters are this
// design's.
//
// Interface: per stream a valid/ready byte handshake; ready is low while
// the result path asks to stall. Timing: combinational from a stream byte
// to the engines; offset counters advance at the edge that accepts a byte.
module input_controller
  import bfsm_pkg::*;
#(
  parameter int unsigned N_STREAMS = 2,
  parameter int unsigned N_ENG     = 24,
  parameter int unsigned SESS_W    = 4,
  localparam int unsigned SW       = (N_STREAMS > 1) ? $clog2(N_STREAMS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              stall,
  // streams
  input  logic [N_STREAMS-1:0]              s_valid,
  input  logic [N_STREAMS-1:0][CHAR_W-1:0]  s_chr,
  input  logic [N_STREAMS-1:0][SESS_W-1:0]  s_sess,
  output logic [N_STREAMS-1:0]              s_ready,
  // offset save / restore
  input  logic [N_STREAMS-1:0]              off_load_en,
  input  logic [N_STREAMS-1:0][OFFS_W-1:0]  off_load,
  output logic [N_STREAMS-1:0][OFFS_W-1:0]  off_cur,
  // allocation
  input  logic [N_ENG-1:0][SW-1:0]          eng_stream,
  input  logic [N_ENG-1:0]                  eng_en,
  // engine side
  output logic [N_ENG-1:0]                  e_valid,
  output logic [N_ENG-1:0][CHAR_W-1:0]      e_chr,
  output logic [N_ENG-1:0][SESS_W+OFFS_W-1:0] e_tag
);
  logic [N_STREAMS-1:0][OFFS_W-1:0] off_q;
  logic [N_STREAMS-1:0]             s_take;
  logic [N_STREAMS-1:0][OFFS_W-1:0] off_live;

  assign off_cur = off_q;

  always_comb begin
    for (int s = 0; s < N_STREAMS; s++) begin
      s_ready[s]  = !stall;
      s_take[s]   = s_valid[s] && !stall;
      off_live[s] = off_load_en[s] ? off_load[s] : off_q[s];
    end
    for (int e = 0; e < N_ENG; e++) begin
      e_valid[e] = eng_en[e] && s_take[eng_stream[e]];
      e_chr[e]   = s_chr[eng_stream[e]];
      e_tag[e]   = {s_sess[eng_stream[e]], off_live[eng_stream[e]]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) off_q <= '0;
    else
      for (int s = 0; s < N_STREAMS; s++)
        off_q[s] <= off_live[s] + OFFS_W'(s_take[s]);
  end
endmodule
