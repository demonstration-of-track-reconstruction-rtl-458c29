// retina_merger (2m): two inputs, one output. Interleaves the hits of its
// inputs and keeps events aligned: an EndEvent word waiting at one input is
// held until the other input reaches its EndEvent too, then a single EE is
// sent on. Hits of the next event therefore never overtake the EE of the
// current one.
//
// An input whose live flag is low is not connected to any data source; the
// merger does not wait for its EE. Hits alternate priority between the inputs
// (round robin). If the two EEs carry different event numbers, ev_err pulses:
// data of different events have been mixed. The output is a register (one
// pipeline stage, one word per cycle). The round-robin order and the live
// flag are this design's own choices.
module retina_merger
  import retina_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  [1:0] in_live,
  input  logic  [1:0] in_valid,
  input  word_t [1:0] in_data,
  output logic  [1:0] in_hold,
  output logic  out_live,
  output logic  out_valid,
  output word_t out_data,
  input  logic  out_hold,
  output logic  ev_err
);
  logic room, prio;
  logic [1:0] hit_rdy, ee_rdy, take;
  logic ee_both;
  word_t nxt;

  assign out_live = |in_live;
  assign room = !out_valid || !out_hold;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      hit_rdy[i] = in_live[i] && in_valid[i] && !in_data[i].ee;
      // an absent input counts as sitting at its EE
      ee_rdy[i]  = !in_live[i] || (in_valid[i] && in_data[i].ee);
    end
    ee_both = ee_rdy[0] && ee_rdy[1] && (in_live != 2'b00);
    take = 2'b00;
    nxt  = in_data[0];
    if (room) begin
      if (hit_rdy[0] && (!hit_rdy[1] || !prio)) begin
        take = 2'b01; nxt = in_data[0];
      end else if (hit_rdy[1]) begin
        take = 2'b10; nxt = in_data[1];
      end else if (ee_both) begin
        take = in_live;
        nxt  = in_live[0] ? in_data[0] : in_data[1];
      end
    end
    for (int i = 0; i < 2; i++) in_hold[i] = in_valid[i] && !take[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; prio <= 1'b0; ev_err <= 1'b0;
    end else begin
      ev_err <= 1'b0;
      if (room) out_valid <= (take != 2'b00);
      if (take == 2'b01) prio <= 1'b1;
      if (take == 2'b10) prio <= 1'b0;
      if (take == 2'b11 && in_data[0].ev != in_data[1].ev) ev_err <= 1'b1;
    end
    if (room && take != 2'b00) out_data <= nxt;
  end
endmodule
