// tb_retina_board: self-checking testbench for one retina_board (board 0 of
// 2, 1 x 2 groups of 4 x 4 engines, so its cells are global rows 0-3,
// columns 0-7). Events of straight tracks are pushed into the two input
// FIFOs (live-data mode), layer l on lane l mod 2. The board's link to
// itself (port 0) is looped back; on port 1 the testbench plays board 1:
// it reads what board 0 sends there and answers with empty events (EE only).
// Checks: the words sent to board 1 are exactly the hits that can reach
// board 1's cells, in lane order, with one EE per event; the track output
// equals the reference for board 0's cells; no error counter moves.
module tb_retina_board;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int NB = 2, NLANES = 2, G_COLS = 2, GR = 4, GC = 4, HD = 128, AW = 7;
  localparam int ROWS = 4, COLS = 8, NEV = 25, THRESH = 64;
  logic clk = 0, rst = 1;
  logic mode, run, stop_en;
  ev_t ev_stop;
  logic [NLANES-1:0][AW:0] ram_len;
  logic [7:0] prescale;
  logic  [NLANES-1:0] ram_we, fifo_valid, fifo_hold;
  logic  [AW-1:0] ram_addr;
  word_t ram_wdata;
  word_t [NLANES-1:0] fifo_data;
  logic  [NB-1:0] tx_live, tx_valid, tx_hold, rx_live, rx_valid, rx_hold;
  word_t [NB-1:0] tx_data, rx_data;
  logic out_valid, out_hold;
  track_t out_data;
  logic [15:0] err_ee, err_mix, err_net;
  logic [31:0] frames, dropped;
  int checks = 0, failures = 0;

  retina_board #(.BOARD(0), .NB(NB), .B_COLS(2), .NLANES(NLANES), .G_COLS(G_COLS),
                 .GR(GR), .GC(GC), .HIT_DEPTH(HD), .FIFO_DEPTH(8), .OUT_DEPTH(8),
                 .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired: out events %0d, link-1 events %0d, board-1 EEs sent %0d, frames %0d", n_ev, b1_ev, b1_sent, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  hit_t evh [NEV][$];
  trk_t reft [NEV][$];
  word_t to_b1 [NLANES][$];   // expected on port 1, per lane (lane order kept)
  int n_tracks = 0, n_ev = 0, n_b1 = 0, b1_ev = 0, tx_stall = 0;

  function automatic bit reaches_b1(hit_t h);
    for (int r = 0; r < ROWS; r++)
      for (int c = COLS; c < 2 * COLS; c++) begin
        int dx, dy;
        dx = h.x - ref_receptor(c, h.layer); dy = h.y - ref_receptor(r, h.layer);
        if (dx <= 12 && dx >= -12 && dy <= 12 && dy >= -12) return 1;
      end
    return 0;
  endfunction

  // self link
  logic  b1_valid, b1_hold;
  word_t b1_data;
  assign rx_valid = {b1_valid, tx_valid[0]};
  assign rx_data  = {b1_data, tx_data[0]};
  assign tx_hold  = {b1_hold, rx_hold[0]};
  assign rx_live     = 2'b11;

  // board 1: drain port 1 and check it, answer with empty events
  int b1_sent = 0;
  bit b1_taken = 0;
  always @(negedge clk) begin
    b1_hold = $urandom_range(3) == 0;
    if (!b1_valid || b1_taken) begin
      b1_valid = !rst && b1_sent < NEV && $urandom_range(1) == 0;
      b1_data = '0; b1_data.ee = 1; b1_data.ev = ev_t'(b1_sent);
    end
    #1;
    b1_taken = rx_valid[1] && !rx_hold[1];
    if (b1_taken) b1_sent++;
    if (tx_valid[1] && tx_hold[1]) tx_stall++;
    if (tx_valid[1] && !tx_hold[1]) begin
      if (tx_data[1].ee) begin
        check(int'(tx_data[1].ev) == b1_ev, "EE number on the link to board 1");
        check(to_b1[0].size() == 0 || int'(to_b1[0][0].ev) != b1_ev, "lane 0 hits missing on link 1");
        check(to_b1[1].size() == 0 || int'(to_b1[1][0].ev) != b1_ev, "lane 1 hits missing on link 1");
        b1_ev++;
      end else begin
        int l;
        word_t w;
        l = int'(tx_data[1].layer) % 2;
        w = tx_data[1]; w.bmask = '0; w.gmask = '0;
        check(to_b1[l].size() > 0 && w == to_b1[l][0], "unexpected hit on the link to board 1");
        if (to_b1[l].size() > 0) void'(to_b1[l].pop_front());
        check(tx_data[1].bmask[1], "bmask bit 1 clear on port 1");
        n_b1++;
      end
    end
  end

  // track output reader
  track_t got[$];
  always @(negedge clk) begin
    out_hold = $urandom_range(3) == 0;
    #1;
    if (out_valid && !out_hold) begin
      if (!out_data.ee) got.push_back(out_data);
      else begin
        int e;
        e = int'(out_data.ev);
        check(e == n_ev, "event order at the output");
        check(got.size() == reft[e].size(),
              $sformatf("event %0d: %0d tracks expected %0d", e, got.size(), reft[e].size()));
        foreach (got[i])
          if (i < reft[e].size())
            check(int'(got[i].row) == reft[e][i].row && int'(got[i].col) == reft[e][i].col &&
                  int'(got[i].du) == reft[e][i].du && int'(got[i].dv) == reft[e][i].dv &&
                  int'(got[i].peak) == reft[e][i].peak, $sformatf("event %0d track %0d", e, i));
        n_tracks += got.size();
        n_ev++;
        got.delete();
      end
    end
  end

  initial begin
    word_t q [NLANES][$];
    mode = 1; run = 0; stop_en = 0; ev_stop = '0; ram_len = '0; prescale = 1;
    ram_we = '0; ram_addr = '0; ram_wdata = '0; fifo_valid = '0; fifo_data = '0;
    b1_valid = 0; b1_data = '0; b1_hold = 0;
    for (int e = 0; e < NEV; e++) begin
      int f[];
      for (int t = 0; t < 1 + $urandom_range(2); t++)
        make_track($urandom_range(ROWS - 1), $urandom_range(2 * COLS - 1),
                   $urandom_range(12) - 6, $urandom_range(12) - 6, evh[e]);
      ref_frame(evh[e], 0, 0, ROWS, COLS, f);
      ref_tracks(f, ROWS, COLS, 0, 0, THRESH, reft[e]);
      for (int l = 0; l < NLANES; l++) begin
        word_t w;
        foreach (evh[e][k])
          if (evh[e][k].layer % 2 == l) begin
            w = '0; w.layer = 4'(evh[e][k].layer); w.x = 10'(evh[e][k].x);
            w.y = 10'(evh[e][k].y); w.ev = ev_t'(e);
            q[l].push_back(w);
            if (reaches_b1(evh[e][k])) to_b1[l].push_back(w);
          end
        w = '0; w.ee = 1; w.ev = ev_t'(e);
        q[l].push_back(w);
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    while (q[0].size() > 0 || q[1].size() > 0) begin
      for (int l = 0; l < NLANES; l++) begin
        fifo_valid[l] = q[l].size() > 0;
        if (q[l].size() > 0) fifo_data[l] = q[l][0];
      end
      #2;
      for (int l = 0; l < NLANES; l++)
        if (q[l].size() > 0 && !fifo_hold[l]) void'(q[l].pop_front());
      @(negedge clk);
    end
    fifo_valid = '0;
    while (n_ev < NEV) @(negedge clk);
    repeat (20) @(negedge clk);
    check(b1_ev == NEV && to_b1[0].size() == 0 && to_b1[1].size() == 0, "link 1 incomplete");
    check(frames == NEV, "frame count");
    check(err_ee == 0 && err_mix == 0 && err_net == 0, "error counters moved");
    check(tx_live == 2'b11, "tx_live");
    check(n_tracks > 0 && n_b1 > 0 && tx_stall > 0, "stimulus too weak");
    $display("tracks=%0d hits_to_board1=%0d", n_tracks, n_b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
