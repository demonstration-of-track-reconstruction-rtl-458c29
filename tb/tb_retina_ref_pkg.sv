// tb_retina_ref_pkg: behavioural reference model of the track finder for the
// testbenches. Written from the algorithm, not from the RTL: weights are
// computed in floating point from the Gaussian, excitations by summing over
// every hit, local maxima and centroids by brute force over the frame.
package tb_retina_ref_pkg;
  import retina_pkg::*;

  typedef struct {
    int layer;
    int x;
    int y;
  } hit_t;

  typedef struct {
    int row;
    int col;
    int du;
    int dv;
    int peak;
  } trk_t;

  function automatic int ref_receptor(int k, int l);
    real s;
    s = (160.0 + 6.0 * l) / 256.0;
    return int'($floor((k * 16.0 + 8.0) * s));
  endfunction

  function automatic int ref_weight(hit_t h, int row, int col);
    int dx, dy, d2;
    dx = h.x - ref_receptor(col, h.layer);
    dy = h.y - ref_receptor(row, h.layer);
    d2 = dx * dx + dy * dy;
    if (d2 > 144) return 0;
    return int'($floor(15.0 * $exp(-d2 / 50.0) + 0.5));
  endfunction

  // excitation of every cell of a rows x cols block at (row0, col0)
  function automatic void ref_frame(hit_t hits[$], int row0, int col0,
                                    int rows, int cols, ref int f[]);
    f = new[rows * cols];
    foreach (f[i]) begin
      int s;
      s = 0;
      foreach (hits[k]) s += ref_weight(hits[k], row0 + i / cols, col0 + i % cols);
      f[i] = (s > 255) ? 255 : s;
    end
  endfunction

  function automatic int fat(int f[], int rows, int cols, int r, int c);
    if (r < 0 || c < 0 || r >= rows || c >= cols) return 0;
    return f[r * cols + c];
  endfunction

  // candidates in row-major order
  function automatic void ref_tracks(int f[], int rows, int cols, int row0,
                                     int col0, int thresh, ref trk_t t[$]);
    t = {};
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int v, su, sv, st;
        bit ok;
        v = f[r * cols + c];
        ok = v >= thresh;
        su = 0; sv = 0; st = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            int n;
            n = fat(f, rows, cols, r + dr, c + dc);
            st += n; su += dc * n; sv += dr * n;
            if (dr == 0 && dc == 0) continue;
            if (dr < 0 || (dr == 0 && dc < 0)) begin
              if (!(v > n)) ok = 0;
            end else if (v < n) ok = 0;
          end
        if (ok) begin
          trk_t k;
          k.row = row0 + r; k.col = col0 + c; k.peak = v;
          // truncation toward zero
          k.du = (st == 0) ? 0 : (su * 16) / st;
          k.dv = (st == 0) ? 0 : (sv * 16) / st;
          t.push_back(k);
        end
      end
  endfunction

  // hits of a straight track through cell centre (row, col) plus an offset
  // in hit units, one per layer, with a little noise
  function automatic void make_track(int row, int col, int off_u, int off_v,
                                     ref hit_t hits[$]);
    for (int l = 0; l < 16; l++) begin
      hit_t h;
      real s;
      s = (160.0 + 6.0 * l) / 256.0;
      h.layer = l;
      h.x = int'($floor((col * 16.0 + 8.0 + off_u) * s)) + int'($urandom_range(2)) - 1;
      h.y = int'($floor((row * 16.0 + 8.0 + off_v) * s)) + int'($urandom_range(2)) - 1;
      if (h.x < 0) h.x = 0;
      if (h.y < 0) h.y = 0;
      hits.push_back(h);
    end
  endfunction
endpackage
