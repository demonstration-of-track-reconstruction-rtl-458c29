// hit_mapper: computes the destination mask of each hit, the pre-computed
// routing information the switch acts on. Targets are rectangular blocks of
// cells (boards for the pre-switch, engine groups for the post-switch): NT
// blocks of T_ROWS x T_COLS cells, T_PER_ROW blocks per row, the first at
// global cell (ROW0, COL0). A hit on layer l is sent to a target when it lies
// within the search distance of the receptor box of that target's cells on
// layer l, so every engine that could give it a weight receives it; a hit
// near a boundary is sent to several targets (hit duplication).
//
// The boxes are constants worked out at elaboration from the geometry in
// retina_pkg; the mask goes to bmask (SEL_G = 0) or gmask (SEL_G = 1).
// EndEvent words pass unchanged. One register stage, valid/hold handshake.
// Deriving the routing from geometry instead of a loaded table is this
// design's own choice.
module hit_mapper
  import retina_pkg::*;
#(
  parameter int unsigned NT        = 8,
  parameter int unsigned T_ROWS    = 7,
  parameter int unsigned T_COLS    = 7,
  parameter int unsigned T_PER_ROW = 4,
  parameter int unsigned ROW0      = 0,
  parameter int unsigned COL0      = 0,
  parameter bit          SEL_G     = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  in_hold,
  output logic  out_valid,
  output word_t out_data,
  input  logic  out_hold
);
  typedef logic [COORD_W:0] box_t [NT * NLAYERS];  // [g*NLAYERS + l], one bit of headroom

  // kind 0/1: x low/high (columns), 2/3: y low/high (rows)
  function automatic box_t mk_box(int kind);
    box_t t;
    int unsigned r0, c0, k0, k1;
    int lo, hi;
    for (int unsigned g = 0; g < NT; g++) begin
      r0 = ROW0 + (g / T_PER_ROW) * T_ROWS;
      c0 = COL0 + (g % T_PER_ROW) * T_COLS;
      k0 = (kind < 2) ? c0 : r0;
      k1 = (kind < 2) ? c0 + T_COLS - 1 : r0 + T_ROWS - 1;
      for (int unsigned l = 0; l < NLAYERS; l++) begin
        lo = int'(receptor(k0, l)) - int'(SEARCH_D);
        hi = int'(receptor(k1, l)) + int'(SEARCH_D);
        if (lo < 0) lo = 0;
        t[g * NLAYERS + l] = (COORD_W + 1)'((kind == 0 || kind == 2) ? lo : hi);
      end
    end
    return t;
  endfunction

  localparam box_t XLO = mk_box(0);
  localparam box_t XHI = mk_box(1);
  localparam box_t YLO = mk_box(2);
  localparam box_t YHI = mk_box(3);

  mask_t m;
  word_t w;
  always_comb begin
    m = '0;
    for (int g = 0; g < NT; g++)
      m[g] = !in_data.ee &&
             {1'b0, in_data.x} >= XLO[g * NLAYERS + 32'(in_data.layer)] &&
             {1'b0, in_data.x} <= XHI[g * NLAYERS + 32'(in_data.layer)] &&
             {1'b0, in_data.y} >= YLO[g * NLAYERS + 32'(in_data.layer)] &&
             {1'b0, in_data.y} <= YHI[g * NLAYERS + 32'(in_data.layer)];
    w = in_data;
    if (SEL_G) w.gmask = m; else w.bmask = m;
  end

  assign in_hold = in_valid && out_valid && out_hold;

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else if (!out_valid || !out_hold) out_valid <= in_valid;
    if (!out_valid || !out_hold) out_data <= w;
  end
endmodule
