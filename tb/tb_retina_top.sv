// tb_retina_top: end-to-end self-checking testbench of retina_top, reduced to 2 boards of 1 x 2 groups of 4 x 4 engines.
// Events of straight tracks (plus noise hits) are generated; each hit goes to
// the lane (VELO module) that reads its layer, layer l on global lane
// l mod (boards x lanes).
//  1 RAM loop: every lane's hit RAM holds NE events; the boards run two
//    passes over them (the loop wraps) and pause, via ev_stop, after event
//    2*NE-1. Every board's tracks for every event must equal the reference
//    (excitations from floating-point Gaussians, brute-force local maxima
//    and centroids over that board's cells).
//  2 prescale 3 for a third pass: only every third event may come out.
//  3 live-data mode: the host loads NF new events into the input FIFOs
//    while the boards are stopped and switches the lanes to the FIFOs (at
//    the latest when one is full); their tracks are checked the same way. The last
//    one carries a corrupted EE number on one lane, which must be detected.
// Outputs are held at random throughout. Mechanisms counted, each must
// occur: track candidates, hits copied to several boards, output stalls,
// input FIFO full, prescaled events dropped, loop wrap, mode switch, EE
// corruption detected, EE held at an engine group.
module tb_retina_top;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int NB = 2, B_COLS = 2, NLANES = 2, G_COLS = 2;
  localparam int GR = 4, GC = 4, HIT_DEPTH = 256, AW = $clog2(HIT_DEPTH);
  localparam int THRESH = 64;
  localparam int G_ROWS = NB / G_COLS, ROWS = G_ROWS * GR, COLS = G_COLS * GC;
  localparam int GROWS = (NB / B_COLS) * ROWS, GCOLS = B_COLS * COLS;
  localparam int NL = NB * NLANES;
  localparam int NE = 10, NF = 6;

  logic clk = 0, rst = 1;
  logic mode, run, stop_en;
  ev_t  ev_stop;
  logic [NB-1:0][NLANES-1:0][AW:0] ram_len;
  logic [7:0] prescale;
  logic  [NB-1:0][NLANES-1:0] ram_we, fifo_valid, fifo_hold;
  logic  [AW-1:0] ram_addr;
  word_t ram_wdata;
  word_t [NB-1:0][NLANES-1:0] fifo_data;
  logic   [NB-1:0] out_valid, out_hold;
  track_t [NB-1:0] out_data;
  logic [NB-1:0][15:0] err_ee, err_mix, err_net;
  logic [NB-1:0][31:0] frames, dropped;
  int checks = 0, failures = 0;

  retina_top #(.NB(NB), .B_COLS(B_COLS), .NLANES(NLANES), .G_COLS(G_COLS), .GR(GR), .GC(GC),
               .HIT_DEPTH(HIT_DEPTH), .FIFO_DEPTH(8), .OUT_DEPTH(8), .LINK_DEPTH(2), .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  hit_t evh [NE + NF][$];       // hits of each generated event
  trk_t reft [NE + NF][NB][$];  // reference tracks per event and board
  int n_tracks = 0, n_events = 0, n_stall = 0, n_full = 0, n_copies = 0;
  int n_live = 0, n_ee_hold = 0;
  int last_ev [NB];
  bit checking = 1;

  function automatic int lane_of(int layer);
    return layer % NL;
  endfunction

  // boards whose cells a hit can reach (independent brute force)
  function automatic int n_boards(hit_t h);
    int n;
    n = 0;
    for (int b = 0; b < NB; b++) begin
      bit hit;
      hit = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          int rr, cc, dx, dy;
          rr = (b / B_COLS) * ROWS + r; cc = (b % B_COLS) * COLS + c;
          dx = h.x - ref_receptor(cc, h.layer); dy = h.y - ref_receptor(rr, h.layer);
          if (dx <= 12 && dx >= -12 && dy <= 12 && dy >= -12) hit = 1;
        end
      n += int'(hit);
    end
    return n;
  endfunction

  function automatic word_t hit_word(hit_t h, int ev);
    word_t w;
    w = '0; w.layer = 4'(h.layer); w.x = 10'(h.x); w.y = 10'(h.y); w.ev = ev_t'(ev);
    return w;
  endfunction

  // which generated event an event number stands for
  function automatic int ev_index(int ev);
    if (ev < 3 * NE) return ev % NE;
    return NE + ev - 3 * NE;
  endfunction

  // ---- output readers --------------------------------------------------
  for (genvar b = 0; b < NB; b++) begin : g_rd
    track_t got[$];
    always @(negedge clk) begin
      out_hold[b] = ($urandom_range(3) == 0);
      #1;
      if (out_valid[b] && out_hold[b]) n_stall++;
      if (out_valid[b] && !out_hold[b]) begin
        if (!out_data[b].ee) got.push_back(out_data[b]);
        else begin
          int e, idx;
          e = int'(out_data[b].ev);
          idx = ev_index(e);
          if (checking) begin
            check(got.size() == reft[idx][b].size(),
                  $sformatf("board %0d event %0d: %0d tracks, expected %0d",
                            b, e, got.size(), reft[idx][b].size()));
            foreach (got[i])
              if (i < reft[idx][b].size())
                check(int'(got[i].row) == reft[idx][b][i].row &&
                      int'(got[i].col) == reft[idx][b][i].col &&
                      int'(got[i].du) == reft[idx][b][i].du &&
                      int'(got[i].dv) == reft[idx][b][i].dv &&
                      int'(got[i].peak) == reft[idx][b][i].peak &&
                      got[i].ev == ev_t'(e),
                      $sformatf("board %0d event %0d track %0d differs", b, e, i));
            n_tracks += got.size();
            n_events++;
            if (e >= 3 * NE) n_live++;
          end
          last_ev[b] = e;
          got.delete();
        end
      end
    end
  end

  // EE waiting at an engine group of board 0 (observed, not driven)
  always @(posedge clk)
    if (|(dut.g_board[0].u_board.u_cells.in_hold)) n_ee_hold++;

  task automatic wait_frames(int n);
    bit done;
    done = 0;
    while (!done) begin
      @(negedge clk);
      done = 1;
      for (int b = 0; b < NB; b++) if (frames[b] < 32'(n)) done = 0;
    end
    repeat (200) @(negedge clk);
  endtask

  initial begin
    int addr [NL];
    mode = 0; run = 0; stop_en = 1; ev_stop = ev_t'(2 * NE); prescale = 1;
    ram_we = '0; ram_addr = '0; ram_wdata = '0; fifo_valid = '0; fifo_data = '0;
    ram_len = '0;
    for (int b = 0; b < NB; b++) last_ev[b] = -1;
    // ---- generate events and references ----
    for (int e = 0; e < NE + NF; e++) begin
      int nt;
      nt = (e == 0) ? 3 : $urandom_range(3);
      for (int t = 0; t < nt; t++)
        make_track($urandom_range(GROWS - 1), $urandom_range(GCOLS - 1),
                   $urandom_range(12) - 6, $urandom_range(12) - 6, evh[e]);
      for (int k = 0; k < 4; k++) begin
        hit_t h;
        h.layer = $urandom_range(15);
        h.x = $urandom_range(ref_receptor(GCOLS - 1, h.layer));
        h.y = $urandom_range(ref_receptor(GROWS - 1, h.layer));
        evh[e].push_back(h);
      end
      foreach (evh[e][k]) if (n_boards(evh[e][k]) > 1) n_copies++;
      for (int b = 0; b < NB; b++) begin
        int f[];
        ref_frame(evh[e], (b / B_COLS) * ROWS, (b % B_COLS) * COLS, ROWS, COLS, f);
        ref_tracks(f, ROWS, COLS, (b / B_COLS) * ROWS, (b % B_COLS) * COLS, THRESH, reft[e][b]);
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- load the hit RAMs ----
    foreach (addr[i]) addr[i] = 0;
    for (int e = 0; e < NE; e++) begin
      for (int ln = 0; ln < NL; ln++) begin
        foreach (evh[e][k])
          if (lane_of(evh[e][k].layer) == ln) begin
            ram_we = '0; ram_we[ln / NLANES][ln % NLANES] = 1;
            ram_addr = AW'(addr[ln]++); ram_wdata = hit_word(evh[e][k], 0);
            @(negedge clk);
          end
        ram_we = '0; ram_we[ln / NLANES][ln % NLANES] = 1;
        ram_addr = AW'(addr[ln]++); ram_wdata = '0; ram_wdata.ee = 1;
        @(negedge clk);
      end
    end
    ram_we = '0;
    for (int ln = 0; ln < NL; ln++) ram_len[ln / NLANES][ln % NLANES] = (AW + 1)'(addr[ln]);
    // ---- 1: two passes over the RAM ----
    run = 1;
    wait_frames(2 * NE);
    for (int b = 0; b < NB; b++)
      check(last_ev[b] == 2 * NE - 1, $sformatf("board %0d stopped after event %0d", b, last_ev[b]));
    // ---- 2: prescaled pass ----
    prescale = 3;
    ev_stop = ev_t'(3 * NE);
    wait_frames(3 * NE);
    for (int b = 0; b < NB; b++)
      check(dropped[b] == 32'(NE - (NE + 2) / 3), $sformatf("board %0d dropped %0d", b, dropped[b]));
    // ---- 3: live data through the input FIFOs ----
    // the host preloads the input FIFOs while the boards are stopped and
    // switches to live data once a FIFO is full or everything is loaded
    prescale = 1;
    begin
      word_t q [NL][$];
      bit [NL-1:0] busy;
      for (int l = 0; l < NL; l++)
        for (int e = NE; e < NE + NF; e++) begin
          word_t w;
          foreach (evh[e][k])
            if (lane_of(evh[e][k].layer) == l) q[l].push_back(hit_word(evh[e][k], 3 * NE + e - NE));
          w = '0; w.ee = 1; w.ev = ev_t'(3 * NE + e - NE);
          if (e == NE + NF - 1 && l == 0) w.ev = w.ev + 8'd77;   // corrupted EE
          q[l].push_back(w);
        end
      // one word per lane per cycle while the lane's FIFO takes it
      busy = '1;
      while (busy != 0) begin
        for (int l = 0; l < NL; l++) begin
          fifo_valid[l / NLANES][l % NLANES] = q[l].size() > 0;
          if (q[l].size() > 0) fifo_data[l / NLANES][l % NLANES] = q[l][0];
        end
        #2;
        for (int l = 0; l < NL; l++)
          if (q[l].size() > 0) begin
            if (fifo_hold[l / NLANES][l % NLANES]) begin
              n_full++;
              mode = 1;
            end
            else void'(q[l].pop_front());
          end
        @(negedge clk);
        for (int l = 0; l < NL; l++) busy[l] = q[l].size() > 0;
      end
      fifo_valid = '0;
      mode = 1;
    end
    // the corrupted last event is not compared
    while (n_live < NF - 1) @(negedge clk);
    checking = 0;
    repeat (3000) @(negedge clk);
    // ---- mechanisms ----
    $display("events=%0d tracks=%0d copied_hits=%0d out_stalls=%0d fifo_full=%0d dropped=%0d live_events=%0d ee_holds=%0d err_ee=%0d err_net=%0d",
             n_events, n_tracks, n_copies, n_stall, n_full, dropped[0], n_live, n_ee_hold, err_ee[0], err_net[0]);
    check(n_tracks > 0, "no track found");
    check(n_copies > 0, "no hit copied to several boards");
    check(n_stall > 0, "no output stall");
    check(n_full > 0, "input FIFO never full");
    check(dropped[0] > 0, "no event dropped by the prescaler");
    check(n_events > NB * NE, "RAM loop did not wrap");
    check(n_live > 0, "no live-data event");
    check(n_ee_hold > 0, "no EE held at an engine group");
    begin
      int ee_tot, mix_tot;
      ee_tot = 0; mix_tot = 0;
      for (int b = 0; b < NB; b++) begin
        ee_tot += int'(err_ee[b]);
        mix_tot += int'(err_mix[b]);
      end
      check(ee_tot > 0, "corrupted EE not detected");
      check(mix_tot == 0, "event mixing reported on clean data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
