// cluster_finder: turns a frame of cell excitations into track candidates.
// A cell is a candidate when its excitation reaches THRESH and is a local
// maximum of its 3x3 neighbourhood: strictly above the neighbours that come
// earlier in row-major order and not below the later ones, so a plateau
// yields one candidate. For each candidate the centroid of the 3x3 cluster
// gives the track parameters with sub-cell precision:
//   du = 16 * sum(dc * R) / sum(R),  dv = 16 * sum(dr * R) / sum(R)
// (dc, dr in {-1,0,1}, cells outside the board count as zero; division
// truncates toward zero), output as the cell's global row/column plus du, dv
// in 1/16 of a cell.
//
// Timing: when frame_valid is high and the finder is idle, the frame is
// copied and frame_ack pulses in the same cycle; the local-maximum flags are
// formed at the copy. Then one candidate per cycle leaves on the output
// stream, lowest cell index first, while the output is not held; an EndEvent
// word with the event number closes the list, and the finder is free for the
// next frame. Threshold value, tie rule and output order are this design's
// own; the 3x3 centroid follows the retina description.
module cluster_finder
  import retina_pkg::*;
#(
  parameter int unsigned ROWS   = 14,
  parameter int unsigned COLS   = 28,
  parameter int unsigned ROW0   = 0,
  parameter int unsigned COL0   = 0,
  parameter int unsigned THRESH = 64
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   frame_valid,
  input  logic   [ROWS*COLS-1:0][EXC_W-1:0] frame,
  input  ev_t    frame_ev,
  output logic   frame_ack,
  output logic   out_valid,
  output track_t out_data,
  input  logic   out_hold
);
  localparam int unsigned NC = ROWS * COLS;
  localparam int unsigned IW = $clog2(NC);

  logic [NC-1:0][EXC_W-1:0] snap;
  logic [NC-1:0] flags, lmax;
  logic busy, room;
  ev_t  ev;

  function automatic logic [EXC_W-1:0] at(input logic [NC-1:0][EXC_W-1:0] f,
                                         int r, int c);
    if (r < 0 || c < 0 || r >= int'(ROWS) || c >= int'(COLS)) return '0;
    return f[r * int'(COLS) + c];
  endfunction

  // local maxima of the incoming frame, one comparator set per cell
  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      always_comb begin
        logic ok;
        logic [EXC_W-1:0] v;
        v  = frame[r * int'(COLS) + c];
        ok = (v >= EXC_W'(THRESH));
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            if (dr < 0 || (dr == 0 && dc < 0)) begin
              if (!(v > at(frame, r + dr, c + dc))) ok = 1'b0;
            end else if (dr > 0 || dc > 0) begin
              if (v < at(frame, r + dr, c + dc)) ok = 1'b0;
            end
          end
        lmax[r * int'(COLS) + c] = ok;
      end
    end
  end

  // lowest pending candidate and its centroid
  logic [IW-1:0] sel;
  int   sr, sc;
  logic signed [15:0] su, sv, stot, nu, nv, qu, qv;
  always_comb begin
    sel = '0;
    for (int i = NC - 1; i >= 0; i--) if (flags[i]) sel = IW'(i);
    sr = int'(sel) / int'(COLS);
    sc = int'(sel) % int'(COLS);
    su = '0; sv = '0; stot = '0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        logic signed [15:0] w;
        w = 16'(at(snap, sr + dr, sc + dc));
        stot = stot + w;
        su = su + 16'(dc) * w;
        sv = sv + 16'(dr) * w;
      end
    nu = su * 16'sd16;
    nv = sv * 16'sd16;
    qu = (stot != 0) ? nu / stot : 16'sd0;
    qv = (stot != 0) ? nv / stot : 16'sd0;
  end

  assign room      = !out_valid || !out_hold;
  assign frame_ack = !busy && frame_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; out_valid <= 1'b0; flags <= '0; ev <= '0;
    end else begin
      if (room) out_valid <= 1'b0;
      if (frame_ack) begin
        snap  <= frame;
        flags <= lmax;
        ev    <= frame_ev;
        busy  <= 1'b1;
      end else if (busy && room) begin
        out_valid <= 1'b1;
        if (flags != '0) begin
          flags[sel]     <= 1'b0;
          out_data.ee    <= 1'b0;
          out_data.ev    <= ev;
          out_data.row   <= RC_W'(ROW0 + 32'(sr));
          out_data.col   <= RC_W'(COL0 + 32'(sc));
          out_data.du    <= FRAC_W'(qu);
          out_data.dv    <= FRAC_W'(qv);
          out_data.peak  <= snap[sel];
        end else begin
          out_data      <= '0;
          out_data.ee   <= 1'b1;
          out_data.ev   <= ev;
          busy          <= 1'b0;
        end
      end
    end
  end
endmodule
