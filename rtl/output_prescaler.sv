// output_prescaler: passes one event out of every `prescale` on the track
// output and drops the others whole (their tracks and their EndEvent word),
// so the host can afford to read and check complete events at a fraction of
// the device's output rate. prescale = 0 or 1 passes every event. The event
// counter advances on each EndEvent word; the first event after reset is
// passed. The setting may change at any time and takes effect at the next
// event. Combinational path, no added latency. Which events are kept is this
// design's own choice.
module output_prescaler
  import retina_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] prescale,
  input  logic       in_valid,
  input  track_t     in_data,
  output logic       in_hold,
  output logic       out_valid,
  output track_t     out_data,
  input  logic       out_hold,
  output logic [31:0] dropped   // events dropped since reset
);
  logic [7:0] cnt;
  logic keep;

  assign keep      = (prescale <= 8'd1) || (cnt == 8'd0);
  assign out_valid = in_valid && keep;
  assign out_data  = in_data;
  assign in_hold   = in_valid && keep && out_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; dropped <= '0;
    end else if (in_valid && !in_hold && in_data.ee) begin
      cnt <= (prescale <= 8'd1 || cnt >= prescale - 8'd1) ? 8'd0 : cnt + 8'd1;
      if (!keep) dropped <= dropped + 1;
    end
  end
endmodule
