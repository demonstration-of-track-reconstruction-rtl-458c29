// stream_fifo: synchronous first-in first-out buffer with the valid/hold
// handshake used on every channel of the track finder.
//
// It serves as the input FIFO that the host fills with hits, the output FIFO
// the host drains tracks from, and the elastic buffer at the end of each
// board-to-board link. A word moves when valid is high and hold is low. The
// FIFO raises in_hold when full, so back-pressure reaches the sender instead
// of losing data. Storage is a DEPTH-entry array; out_valid/out_data show the
// oldest entry combinationally (first-word fall-through), one cycle after it
// was written. Depth and the fall-through choice are this design's own.
module stream_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  T     in_data,
  output logic in_hold,
  output logic out_valid,
  output T     out_data,
  input  logic out_hold,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  T mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign in_hold   = (count == CW'(DEPTH));
  assign out_valid = (count != 0);
  assign out_data  = mem[rp];
  assign push = in_valid && !in_hold;
  assign pop  = out_valid && !out_hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  // no word may be written to a full FIFO
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
                                  32'(count) <= DEPTH);
endmodule
