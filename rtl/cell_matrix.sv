// cell_matrix: the engines of one board, G_ROWS x G_COLS groups of GR x GC
// cells, the board's block of the track-parameter matrix starting at global
// cell (ROW0, COL0). Group g takes the hits of one post-switch output and
// broadcasts them to all its engines, which work in lockstep.
//
// Each engine keeps its last excitation in a register (the frame). A group
// whose frame has not yet been taken by the cluster finder must not close
// another event, so its feeder holds an incoming EndEvent word (raises
// in_hold) while the group's frame is full or an EE is still in the engine
// pipeline; hits of the next event keep flowing. When every group's frame is
// full, frame_valid rises; frame_ack (one cycle) releases all groups.
// frame_ev is the event number; ev_err pulses at the ack if groups disagree
// on it. Grouping and the frame hand-over are this design's own choices.
module cell_matrix
  import retina_pkg::*;
#(
  parameter int unsigned G_ROWS = 2,
  parameter int unsigned G_COLS = 4,
  parameter int unsigned GR     = 7,
  parameter int unsigned GC     = 7,
  parameter int unsigned ROW0   = 0,
  parameter int unsigned COL0   = 0,
  localparam int unsigned NG    = G_ROWS * G_COLS,
  localparam int unsigned ROWS  = G_ROWS * GR,
  localparam int unsigned COLS  = G_COLS * GC
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  [NG-1:0] in_valid,
  input  word_t [NG-1:0] in_data,
  output logic  [NG-1:0] in_hold,
  output logic  frame_valid,
  output logic  [ROWS*COLS-1:0][EXC_W-1:0] frame,
  output ev_t   frame_ev,
  input  logic  frame_ack,
  output logic  ev_err
);
  logic [NG-1:0] full, inflight;
  logic [NG-1:0] g_done;
  ev_t  [NG-1:0] g_ev;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned GRow = (g / G_COLS) * GR;
    localparam int unsigned GCol = (g % G_COLS) * GC;
    logic acc_v;
    logic [GR*GC-1:0] dv;
    ev_t  [GR*GC-1:0] de;

    assign in_hold[g] = in_valid[g] && in_data[g].ee && (full[g] || inflight[g]);
    assign acc_v = in_valid[g] && !in_hold[g];

    for (genvar c = 0; c < GR * GC; c++) begin : g_cell
      localparam int unsigned R = GRow + c / GC;
      localparam int unsigned C = GCol + c % GC;
      retina_engine #(.ROW(ROW0 + R), .COL(COL0 + C)) u_eng (
        .clk, .rst,
        .in_valid (acc_v),
        .in_data  (in_data[g]),
        .exc_valid(dv[c]),
        .exc      (frame[R * COLS + C]),
        .exc_ev   (de[c])
      );
    end
    // all engines of a group run in lockstep; cell 0 speaks for the group
    assign g_done[g] = dv[0];
    assign g_ev[g]   = de[0];

    always_ff @(posedge clk) begin
      if (rst) begin
        full[g] <= 1'b0; inflight[g] <= 1'b0;
      end else begin
        if (acc_v && in_data[g].ee) inflight[g] <= 1'b1;
        if (g_done[g]) begin
          inflight[g] <= 1'b0; full[g] <= 1'b1;
        end
        if (frame_ack) full[g] <= 1'b0;
      end
    end
  end

  assign frame_valid = &full;
  assign frame_ev    = g_ev[0];

  always_ff @(posedge clk) begin
    if (rst) ev_err <= 1'b0;
    else begin
      ev_err <= 1'b0;
      for (int g = 1; g < NG; g++)
        if (frame_ack && g_ev[g] != g_ev[0]) ev_err <= 1'b1;
    end
  end
endmodule
