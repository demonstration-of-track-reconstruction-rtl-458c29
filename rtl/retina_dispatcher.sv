// retina_dispatcher (2d): the basic block of the distribution network, two
// inputs (L, R) and two outputs (0, 1). Any input can reach any output, or
// both. Built as in the classic retina dispatcher: each input feeds a
// splitter, splitter output o of both splitters feeds merger o, merger o
// drives output o. Latency two cycles (splitter then merger register).
//
// Output o serves mask block IDX*2 + o of width STRIDE (see retina_splitter).
// ev_err is the OR of the two mergers' event-mixing flags.
module retina_dispatcher
  import retina_pkg::*;
#(
  parameter int unsigned IDX    = 0,
  parameter int unsigned STRIDE = 1,
  parameter bit          SEL_G  = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  [1:0] in_live,
  input  logic  [1:0] in_valid,
  input  word_t [1:0] in_data,
  output logic  [1:0] in_hold,
  output logic  [1:0] out_live,
  output logic  [1:0] out_valid,
  output word_t [1:0] out_data,
  input  logic  [1:0] out_hold,
  output logic  ev_err
);
  // s_* [splitter][output]
  logic  [1:0][1:0] s_valid, s_hold;
  word_t [1:0][1:0] s_data;
  logic  [1:0] m_err;

  for (genvar s = 0; s < 2; s++) begin : g_split
    retina_splitter #(.LO(IDX * 2), .STRIDE(STRIDE), .SEL_G(SEL_G)) u_split (
      .clk, .rst,
      .in_valid (in_valid[s] && in_live[s]),
      .in_data  (in_data[s]),
      .in_hold  (in_hold[s]),
      .out_valid(s_valid[s]),
      .out_data (s_data[s]),
      .out_hold (s_hold[s])
    );
  end

  for (genvar o = 0; o < 2; o++) begin : g_merge
    logic [1:0] mh;
    retina_merger u_merge (
      .clk, .rst,
      .in_live  (in_live),
      .in_valid ({s_valid[1][o], s_valid[0][o]}),
      .in_data  ({s_data[1][o],  s_data[0][o]}),
      .in_hold  (mh),
      .out_live (out_live[o]),
      .out_valid(out_valid[o]),
      .out_data (out_data[o]),
      .out_hold (out_hold[o]),
      .ev_err   (m_err[o])
    );
    assign s_hold[0][o] = mh[0];
    assign s_hold[1][o] = mh[1];
  end

  assign ev_err = |m_err;
endmodule
