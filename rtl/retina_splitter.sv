// retina_splitter (2s): one input, two outputs. Sends each hit to output 0,
// output 1 or both, following the pre-computed routing scheme, and copies
// every EndEvent word to both outputs.
//
// Routing: the hit's destination mask (bmask when SEL_G = 0, gmask when
// SEL_G = 1) is split into blocks of STRIDE bits. Output o leads to the final
// network outputs of block LO + o, so the hit goes to o when any bit of that
// block is set. A hit wanted by neither output is dropped. Holding a copy per
// output lets one side stall while the other drains: the input is taken only
// when every output it needs can take a word in this cycle. Each output is a
// register, so the splitter is one pipeline stage (latency 1 cycle, one word
// per cycle). The mask-based routing is this design's own encoding of the
// routing scheme.
module retina_splitter
  import retina_pkg::*;
#(
  parameter int unsigned LO     = 0,
  parameter int unsigned STRIDE = 1,
  parameter bit          SEL_G  = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  in_hold,
  output logic  [1:0] out_valid,
  output word_t [1:0] out_data,
  input  logic  [1:0] out_hold
);
  mask_t m;
  logic [1:0] want, room;

  always_comb begin
    m = SEL_G ? in_data.gmask : in_data.bmask;
    for (int o = 0; o < 2; o++) begin
      want[o] = in_data.ee || (m[(LO + o) * STRIDE +: STRIDE] != '0);
      room[o] = !out_valid[o] || !out_hold[o];
    end
    in_hold = in_valid && ((want & ~room) != 2'b00);
  end

  for (genvar o = 0; o < 2; o++) begin : g_out
    always_ff @(posedge clk) begin
      if (rst) out_valid[o] <= 1'b0;
      else if (room[o]) out_valid[o] <= in_valid && !in_hold && want[o];
      if (room[o] && in_valid && !in_hold && want[o]) out_data[o] <= in_data;
    end
  end
endmodule
