// retina_top: the track-finder demonstrator, NB identical boards joined in a
// full mesh. Board a's pre-switch port b is wired through a link buffer to
// board b's post-switch port a, so every board can send hits to every board
// (itself included), as the optical patch panel does between the cards.
// Each link is modelled by a LINK_DEPTH-word stream_fifo carrying the same
// valid/hold back-pressure as the transceiver protocol; the serial
// transceivers themselves are not modelled. Host access (hit RAM loading,
// input FIFOs, track output FIFOs, configuration, error counters) is brought
// out per board as plain ports in place of the PCIe interface.
// Default size: 8 boards of 2 x 4 groups of 7 x 7 engines (392 per board),
// the boards tiling a 56 x 56 cell matrix as 4 rows of 2; two VELO modules
// (lanes) per board, 16 in all.
module retina_top
  import retina_pkg::*;
#(
  parameter int unsigned NB         = 8,
  parameter int unsigned B_COLS     = 2,
  parameter int unsigned NLANES     = 2,
  parameter int unsigned G_COLS     = 4,
  parameter int unsigned GR         = 7,
  parameter int unsigned GC         = 7,
  parameter int unsigned HIT_DEPTH  = 4096,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned OUT_DEPTH  = 512,
  parameter int unsigned LINK_DEPTH = 8,
  parameter int unsigned THRESH     = 64,
  localparam int unsigned AW = $clog2(HIT_DEPTH)
) (
  input  logic clk,
  input  logic rst,
  input  logic mode,
  input  logic run,
  input  logic stop_en,
  input  ev_t  ev_stop,
  input  logic [NB-1:0][NLANES-1:0][AW:0] ram_len,
  input  logic [7:0]  prescale,
  input  logic  [NB-1:0][NLANES-1:0] ram_we,
  input  logic  [AW-1:0]             ram_addr,
  input  word_t                      ram_wdata,
  input  logic  [NB-1:0][NLANES-1:0] fifo_valid,
  input  word_t [NB-1:0][NLANES-1:0] fifo_data,
  output logic  [NB-1:0][NLANES-1:0] fifo_hold,
  output logic   [NB-1:0] out_valid,
  output track_t [NB-1:0] out_data,
  input  logic   [NB-1:0] out_hold,
  output logic [NB-1:0][15:0] err_ee,
  output logic [NB-1:0][15:0] err_mix,
  output logic [NB-1:0][15:0] err_net,
  output logic [NB-1:0][31:0] frames,
  output logic [NB-1:0][31:0] dropped
);
  // [from][to]
  logic  [NB-1:0][NB-1:0] t_live, t_valid, t_hold;
  word_t [NB-1:0][NB-1:0] t_data;
  // [to][from]
  logic  [NB-1:0][NB-1:0] r_live, r_valid, r_hold;
  word_t [NB-1:0][NB-1:0] r_data;

  for (genvar b = 0; b < NB; b++) begin : g_board
    retina_board #(
      .BOARD(b), .NB(NB), .B_COLS(B_COLS), .NLANES(NLANES), .G_COLS(G_COLS),
      .GR(GR), .GC(GC), .HIT_DEPTH(HIT_DEPTH), .FIFO_DEPTH(FIFO_DEPTH),
      .OUT_DEPTH(OUT_DEPTH), .THRESH(THRESH)
    ) u_board (
      .clk, .rst, .mode, .run, .stop_en, .ev_stop, .ram_len(ram_len[b]), .prescale,
      .ram_we(ram_we[b]), .ram_addr, .ram_wdata,
      .fifo_valid(fifo_valid[b]), .fifo_data(fifo_data[b]), .fifo_hold(fifo_hold[b]),
      .tx_live(t_live[b]), .tx_valid(t_valid[b]), .tx_data(t_data[b]), .tx_hold(t_hold[b]),
      .rx_live(r_live[b]), .rx_valid(r_valid[b]), .rx_data(r_data[b]), .rx_hold(r_hold[b]),
      .out_valid(out_valid[b]), .out_data(out_data[b]), .out_hold(out_hold[b]),
      .err_ee(err_ee[b]), .err_mix(err_mix[b]), .err_net(err_net[b]),
      .frames(frames[b]), .dropped(dropped[b])
    );
    for (genvar d = 0; d < NB; d++) begin : g_link
      stream_fifo #(.T(word_t), .DEPTH(LINK_DEPTH)) u_link (
        .clk, .rst,
        .in_valid (t_valid[b][d]), .in_data(t_data[b][d]), .in_hold(t_hold[b][d]),
        .out_valid(r_valid[d][b]), .out_data(r_data[d][b]), .out_hold(r_hold[d][b]),
        .count()
      );
      assign r_live[d][b] = t_live[b][d];
    end
  end
endmodule
