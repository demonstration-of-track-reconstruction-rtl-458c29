// hit_source: feeds the hits of one detector module into a board, from one
// of two places selected by mode:
//   mode 0  the hit RAM, DEPTH words loaded by the host, read in a loop over
//           addresses 0 .. ram_len-1 to give a continuous flow of events;
//           the source stamps every word with its running event number;
//   mode 1  the input FIFO the host pushes words into (live data); words go
//           out as pushed, with the host's event numbers.
// A new mode takes effect only at an event boundary (after an EndEvent word
// or while idle), so events are never cut. run = 0 stops the RAM loop at the
// next event boundary too. With stop_en set, no event numbered ev_stop or
// later is started from RAM, so every lane of every board pauses after the
// same event, and the host can switch all of them to live data (mode 1)
// with consistent event numbers. RAM words are read synchronously into the output
// register, one per cycle while not held. Word layout in RAM is word_t (the
// mask fields are ignored). Sizes and the boundary rule are this design's
// own; the two input paths follow the simulated- and live-data set-ups.
module hit_source
  import retina_pkg::*;
#(
  parameter int unsigned DEPTH      = 4096,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mode,
  input  logic          run,
  input  logic          stop_en,
  input  ev_t           ev_stop,
  input  logic [AW:0]   ram_len,
  // host write port of the hit RAM
  input  logic          ram_we,
  input  logic [AW-1:0] ram_addr,
  input  word_t         ram_wdata,
  // host side of the input FIFO
  input  logic          fifo_valid,
  input  word_t         fifo_data,
  output logic          fifo_hold,
  // hit stream out
  output logic          out_valid,
  output word_t         out_data,
  input  logic          out_hold,
  output logic          cur_mode
);
  word_t mem [DEPTH];
  logic [AW-1:0] rd;
  ev_t  ev;
  logic boundary, room, ram_go;
  logic f_valid, f_hold;
  word_t f_data, rword;

  stream_fifo #(.T(word_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .in_valid (fifo_valid), .in_data(fifo_data), .in_hold(fifo_hold),
    .out_valid(f_valid), .out_data(f_data), .out_hold(f_hold),
    .count    ()
  );

  always_ff @(posedge clk) if (ram_we) mem[ram_addr] <= ram_wdata;

  assign room   = !out_valid || !out_hold;
  assign ram_go = !cur_mode && room && ram_len != '0 &&
                  (!boundary || (run && !(stop_en && ev == ev_stop)));
  assign f_hold = !(cur_mode && room);

  always_comb begin
    rword = mem[rd];
    rword.ev = ev;
    rword.bmask = '0;
    rword.gmask = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd <= '0; ev <= '0; boundary <= 1'b1; cur_mode <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (boundary && room) cur_mode <= mode;
      if (room) out_valid <= 1'b0;
      if (ram_go && !(boundary && mode != cur_mode)) begin
        out_valid <= 1'b1;
        out_data  <= rword;
        boundary  <= rword.ee;
        if (rword.ee) ev <= ev + 1'b1;
        rd <= ({1'b0, rd} == ram_len - 1'b1) ? '0 : rd + 1'b1;
      end else if (cur_mode && room && f_valid && !(boundary && mode != cur_mode)) begin
        out_valid <= 1'b1;
        out_data  <= f_data;
        boundary  <= f_data.ee;
      end
    end
  end
endmodule
