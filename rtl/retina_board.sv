// retina_board: everything inside one FPGA card of the demonstrator.
//   hit_source x NLANES  one per VELO module read by this board (hit RAM in
//                        loop, or host input FIFO)
//   hit_mapper           marks each hit with the boards whose cells need it
//   pre-switch           NB-port retina_switch, lanes on ports 0..NLANES-1,
//                        port b leaves on the link to board b (tx_*)
//   ee_checker x NB      monitor every incoming link (rx_*)
//   hit_mapper x NB      marks each received hit with this board's engine
//                        groups that need it
//   post-switch          NB-port retina_switch, output g feeds group g
//   cell_matrix          G_ROWS x G_COLS groups of GR x GC engines
//   cluster_finder       local maxima and centroids -> tracks
//   output_prescaler     keeps one event in `prescale`
//   stream_fifo          output FIFO the host reads tracks from
// The board's cells are the block of the global matrix at board row
// BOARD / B_COLS, board column BOARD % B_COLS. The pre- and post-switch
// split of the network, the links between them and the per-board content of
// the routing follow the demonstrator; the number of engine groups equal to
// the number of boards (so both switches are NB x NB) is this design's own.
// err_* count EE corruption and event mixing seen on the links, plus any
// mixing flagged inside the switches and the engine matrix (net_err).
module retina_board
  import retina_pkg::*;
#(
  parameter int unsigned BOARD      = 0,
  parameter int unsigned NB         = 8,
  parameter int unsigned B_COLS     = 2,
  parameter int unsigned NLANES     = 2,
  parameter int unsigned G_COLS     = 4,
  parameter int unsigned GR         = 7,
  parameter int unsigned GC         = 7,
  parameter int unsigned HIT_DEPTH  = 4096,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned OUT_DEPTH  = 512,
  parameter int unsigned THRESH     = 64,
  localparam int unsigned AW     = $clog2(HIT_DEPTH),
  localparam int unsigned G_ROWS = NB / G_COLS,
  localparam int unsigned ROWS   = G_ROWS * GR,
  localparam int unsigned COLS   = G_COLS * GC,
  localparam int unsigned ROW0   = (BOARD / B_COLS) * ROWS,
  localparam int unsigned COL0   = (BOARD % B_COLS) * COLS
) (
  input  logic  clk,
  input  logic  rst,
  // host configuration
  input  logic  mode,
  input  logic  run,
  input  logic  stop_en,
  input  ev_t   ev_stop,
  input  logic  [NLANES-1:0][AW:0] ram_len,
  input  logic  [7:0] prescale,
  // host access to the hit RAMs and input FIFOs
  input  logic  [NLANES-1:0] ram_we,
  input  logic  [AW-1:0]     ram_addr,
  input  word_t              ram_wdata,
  input  logic  [NLANES-1:0] fifo_valid,
  input  word_t [NLANES-1:0] fifo_data,
  output logic  [NLANES-1:0] fifo_hold,
  // optical links, port b = to / from board b
  output logic  [NB-1:0] tx_live,
  output logic  [NB-1:0] tx_valid,
  output word_t [NB-1:0] tx_data,
  input  logic  [NB-1:0] tx_hold,
  input  logic  [NB-1:0] rx_live,
  input  logic  [NB-1:0] rx_valid,
  input  word_t [NB-1:0] rx_data,
  output logic  [NB-1:0] rx_hold,
  // track output to the host
  output logic   out_valid,
  output track_t out_data,
  input  logic   out_hold,
  // status
  output logic  [15:0] err_ee,
  output logic  [15:0] err_mix,
  output logic  [15:0] err_net,
  output logic  [31:0] frames,
  output logic  [31:0] dropped
);
  // ---- input side -----------------------------------------------------
  logic  [NB-1:0] pi_valid, pi_hold, pi_live;
  word_t [NB-1:0] pi_data;
  logic  [NLANES-1:0] cur_mode;

  for (genvar k = 0; k < NLANES; k++) begin : g_lane
    logic  sv, sh;
    word_t sd;
    hit_source #(.DEPTH(HIT_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)) u_src (
      .clk, .rst, .mode, .run, .stop_en, .ev_stop, .ram_len(ram_len[k]),
      .ram_we(ram_we[k]), .ram_addr, .ram_wdata,
      .fifo_valid(fifo_valid[k]), .fifo_data(fifo_data[k]), .fifo_hold(fifo_hold[k]),
      .out_valid(sv), .out_data(sd), .out_hold(sh), .cur_mode(cur_mode[k])
    );
    hit_mapper #(.NT(NB), .T_ROWS(ROWS), .T_COLS(COLS), .T_PER_ROW(B_COLS),
                 .ROW0(0), .COL0(0), .SEL_G(1'b0)) u_bmap (
      .clk, .rst,
      .in_valid(sv), .in_data(sd), .in_hold(sh),
      .out_valid(pi_valid[k]), .out_data(pi_data[k]), .out_hold(pi_hold[k])
    );
    assign pi_live[k] = 1'b1;
  end
  for (genvar k = NLANES; k < NB; k++) begin : g_nolane
    assign pi_live[k]  = 1'b0;
    assign pi_valid[k] = 1'b0;
    assign pi_data[k]  = '0;
  end

  logic pre_err, post_err, cm_err;
  retina_switch #(.N(NB), .SEL_G(1'b0)) u_pre (
    .clk, .rst,
    .in_live(pi_live), .in_valid(pi_valid), .in_data(pi_data), .in_hold(pi_hold),
    .out_live(tx_live), .out_valid(tx_valid), .out_data(tx_data), .out_hold(tx_hold),
    .ev_err(pre_err)
  );

  // ---- receive side ---------------------------------------------------
  logic  [NB-1:0] po_valid, po_hold;
  word_t [NB-1:0] po_data;
  logic  [NB-1:0][15:0] c_ee, c_mix;
  logic  [NB-1:0] e_ee, e_mix;

  for (genvar b = 0; b < NB; b++) begin : g_rx
    ee_checker u_chk (
      .clk, .rst, .valid(rx_valid[b] && rx_live[b]), .data(rx_data[b]), .hold(rx_hold[b]),
      .ee_err(e_ee[b]), .mix_err(e_mix[b]), .ee_err_cnt(c_ee[b]), .mix_err_cnt(c_mix[b])
    );
    hit_mapper #(.NT(NB), .T_ROWS(GR), .T_COLS(GC), .T_PER_ROW(G_COLS),
                 .ROW0(ROW0), .COL0(COL0), .SEL_G(1'b1)) u_gmap (
      .clk, .rst,
      .in_valid(rx_valid[b] && rx_live[b]), .in_data(rx_data[b]), .in_hold(rx_hold[b]),
      .out_valid(po_valid[b]), .out_data(po_data[b]), .out_hold(po_hold[b])
    );
  end

  logic  [NB-1:0] g_valid, g_hold, g_live;
  word_t [NB-1:0] g_data;
  retina_switch #(.N(NB), .SEL_G(1'b1)) u_post (
    .clk, .rst,
    .in_live(rx_live), .in_valid(po_valid), .in_data(po_data), .in_hold(po_hold),
    .out_live(g_live), .out_valid(g_valid), .out_data(g_data), .out_hold(g_hold),
    .ev_err(post_err)
  );

  // ---- engines, clustering, output -----------------------------------
  logic frame_valid, frame_ack;
  logic [ROWS*COLS-1:0][EXC_W-1:0] frame;
  ev_t  frame_ev;

  cell_matrix #(.G_ROWS(G_ROWS), .G_COLS(G_COLS), .GR(GR), .GC(GC),
                .ROW0(ROW0), .COL0(COL0)) u_cells (
    .clk, .rst,
    .in_valid(g_valid), .in_data(g_data), .in_hold(g_hold),
    .frame_valid, .frame, .frame_ev, .frame_ack, .ev_err(cm_err)
  );

  logic   cf_valid, cf_hold, ps_valid, ps_hold;
  track_t cf_data, ps_data;
  cluster_finder #(.ROWS(ROWS), .COLS(COLS), .ROW0(ROW0), .COL0(COL0),
                   .THRESH(THRESH)) u_clus (
    .clk, .rst, .frame_valid, .frame, .frame_ev, .frame_ack,
    .out_valid(cf_valid), .out_data(cf_data), .out_hold(cf_hold)
  );

  output_prescaler u_pre_sc (
    .clk, .rst, .prescale,
    .in_valid(cf_valid), .in_data(cf_data), .in_hold(cf_hold),
    .out_valid(ps_valid), .out_data(ps_data), .out_hold(ps_hold),
    .dropped
  );

  stream_fifo #(.T(track_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst,
    .in_valid(ps_valid), .in_data(ps_data), .in_hold(ps_hold),
    .out_valid, .out_data, .out_hold, .count()
  );

  // ---- status ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      err_net <= '0; frames <= '0;
    end else begin
      if (pre_err || post_err || cm_err) err_net <= err_net + 1'b1;
      if (frame_ack) frames <= frames + 1;
    end
  end
  always_comb begin
    err_ee = '0; err_mix = '0;
    for (int b = 0; b < int'(NB); b++) begin
      err_ee  = err_ee  + c_ee[b];
      err_mix = err_mix + c_mix[b];
    end
  end
endmodule
