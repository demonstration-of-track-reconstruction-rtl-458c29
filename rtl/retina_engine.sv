// retina_engine: one cell of the retina. The cell stands for a reference
// track (cell row ROW, column COL of the global matrix); its receptors are the
// points where that track crosses each detector layer. Every hit of the
// event is weighted by a truncated Gaussian of its squared distance to the
// receptor of its layer and the weights are summed; at the EndEvent word the
// sum (the cell's excitation) is latched into exc and the sum restarts.
//
// Pipeline of three register stages, one hit per cycle, no back-pressure:
//   1  |dx|, |dy| to the receptor of the hit's layer, far flag if either
//      exceeds the search distance;
//   2  d2 = dx^2 + dy^2, weight from a table computed at elaboration;
//   3  accumulate (saturating at the top of EXC_W); on EE latch exc/exc_ev
//      and pulse exc_valid, three cycles after the EE entered.
// The Gaussian weight and search distance follow the retina description;
// table size, widths and the receptor model are this design's own
// (see retina_pkg).
module retina_engine
  import retina_pkg::*;
#(
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  word_t            in_data,
  output logic             exc_valid,
  output logic [EXC_W-1:0] exc,
  output ev_t              exc_ev
);
  localparam int unsigned D2MAX = SEARCH_D * SEARCH_D;
  localparam int unsigned DW    = $clog2(SEARCH_D + 1);
  localparam int unsigned D2W   = $clog2(2 * D2MAX + 1);
  localparam int unsigned D2I   = $clog2(D2MAX + 1);

  typedef logic [COORD_W-1:0] rtab_t [NLAYERS];
  typedef logic [W_W-1:0]     wtab_t [D2MAX + 1];

  function automatic rtab_t mk_rtab(int unsigned k);
    rtab_t t;
    for (int unsigned l = 0; l < NLAYERS; l++) t[l] = COORD_W'(receptor(k, l));
    return t;
  endfunction

  function automatic wtab_t mk_wtab();
    wtab_t t;
    for (int unsigned d = 0; d <= D2MAX; d++) t[d] = W_W'(gauss_weight(d));
    return t;
  endfunction

  localparam rtab_t RX = mk_rtab(COL);
  localparam rtab_t RY = mk_rtab(ROW);
  localparam wtab_t WT = mk_wtab();

  // stage 1
  logic s1_v, s1_ee, s1_far;
  ev_t  s1_ev;
  logic [DW-1:0] s1_dx, s1_dy;
  // stage 2
  logic s2_v, s2_ee;
  ev_t  s2_ev;
  logic [W_W-1:0] s2_w;
  // accumulator
  logic [EXC_W-1:0] acc;

  logic [COORD_W-1:0] ax, ay;
  logic [D2W-1:0] d2;
  logic [EXC_W:0] sum;

  always_comb begin
    ax = (in_data.x > RX[in_data.layer]) ? in_data.x - RX[in_data.layer]
                                         : RX[in_data.layer] - in_data.x;
    ay = (in_data.y > RY[in_data.layer]) ? in_data.y - RY[in_data.layer]
                                         : RY[in_data.layer] - in_data.y;
    d2 = D2W'(s1_dx) * D2W'(s1_dx) + D2W'(s1_dy) * D2W'(s1_dy);
    sum = {1'b0, acc} + (EXC_W + 1)'(s2_w);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_v <= 1'b0; s2_v <= 1'b0; acc <= '0; exc_valid <= 1'b0;
      exc <= '0; exc_ev <= '0;
    end else begin
      // stage 1
      s1_v   <= in_valid;
      s1_ee  <= in_data.ee;
      s1_ev  <= in_data.ev;
      s1_far <= (ax > COORD_W'(SEARCH_D)) || (ay > COORD_W'(SEARCH_D));
      s1_dx  <= DW'(ax);
      s1_dy  <= DW'(ay);
      // stage 2
      s2_v  <= s1_v;
      s2_ee <= s1_ee;
      s2_ev <= s1_ev;
      s2_w  <= (s1_far || s1_ee || d2 > D2W'(D2MAX)) ? '0 : WT[D2I'(d2)];
      // stage 3
      exc_valid <= s2_v && s2_ee;
      if (s2_v && s2_ee) begin
        exc    <= acc;
        exc_ev <= s2_ev;
        acc    <= '0;
      end else if (s2_v) begin
        acc <= sum[EXC_W] ? '1 : sum[EXC_W-1:0];
      end
    end
  end
endmodule
