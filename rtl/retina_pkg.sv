// retina_pkg: types, constants and elaboration-time geometry shared by the
// artificial-retina track finder.
//
// Every data channel carries a stream of words; an EndEvent (EE) word closes
// each event, so blocks need no global event synchronisation. A word is
// either a detector hit (layer = VELO module index, x/y position) or an EE
// carrying an 8-bit event number. Two destination masks ride with a hit:
// bmask selects boards (used by the pre-switch), gmask selects engine groups
// inside a board (used by the post-switch).
//
// Geometry (this design's own choice, the reference track model is not
// spelled out numerically): cell (r,c) of the global track-parameter matrix
// has centre u = c*PITCH + PITCH/2, v = r*PITCH + PITCH/2. Its reference
// track crosses layer l at the receptor x = (u*S_l)>>8, y = (v*S_l)>>8, with
// S_l = 160 + 6*l, a straight track from the origin seen on planes at
// increasing distance. A hit gets a Gaussian weight of its squared distance
// to the receptor, truncated to zero beyond the search distance.
package retina_pkg;

  localparam int unsigned NLAYERS  = 16;   // VELO modules covered (16)
  localparam int unsigned LAYER_W  = 4;
  localparam int unsigned COORD_W  = 10;   // hit x / y
  localparam int unsigned EV_W     = 8;    // event number carried by EE
  localparam int unsigned MASK_W   = 8;    // max boards / groups routed
  localparam int unsigned PITCH    = 16;   // cell pitch on the reference plane
  localparam int unsigned SEARCH_D = 12;   // search distance (hit units)
  localparam int unsigned SIGMA2   = 25;   // Gaussian sigma^2 (hit units^2)
  localparam int unsigned W_W      = 4;    // weight width
  localparam int unsigned W_MAX    = 15;   // weight at zero distance
  localparam int unsigned EXC_W    = 8;    // excitation (sum of 16 weights)
  localparam int unsigned RC_W     = 6;    // global row / column index
  localparam int unsigned FRAC_W   = 6;    // signed centroid offset, 1/16 cell

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [EV_W-1:0]    ev_t;
  typedef logic [MASK_W-1:0]  mask_t;

  // word on every hit channel
  typedef struct packed {
    logic               ee;     // 1: EndEvent word
    ev_t                ev;     // event number (EE) / event tag (hit)
    logic [LAYER_W-1:0] layer;
    coord_t             x;
    coord_t             y;
    mask_t              bmask;  // destination boards
    mask_t              gmask;  // destination engine groups
  } word_t;

  // word on the track output channel
  typedef struct packed {
    logic                     ee;
    ev_t                      ev;
    logic [RC_W-1:0]          row;   // global cell row    (v)
    logic [RC_W-1:0]          col;   // global cell column (u)
    logic signed [FRAC_W-1:0] du;    // centroid offset in u, 1/16 cell
    logic signed [FRAC_W-1:0] dv;    // centroid offset in v, 1/16 cell
    logic [EXC_W-1:0]         peak;  // excitation of the local maximum
  } track_t;

  // layer scale S_l in 1/256 units
  function automatic int unsigned layer_scale(int unsigned l);
    return 160 + 6 * l;
  endfunction

  // receptor coordinate of cell index k (row or column) on layer l
  function automatic int unsigned receptor(int unsigned k, int unsigned l);
    return ((k * PITCH + PITCH / 2) * layer_scale(l)) >> 8;
  endfunction

  // truncated Gaussian weight of squared distance d2
  function automatic int unsigned gauss_weight(int unsigned d2);
    if (d2 > SEARCH_D * SEARCH_D) return 0;
    return int'($floor(real'(W_MAX) * $exp(-real'(d2) / (2.0 * real'(SIGMA2))) + 0.5));
  endfunction

endpackage
