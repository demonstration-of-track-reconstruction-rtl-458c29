// tb_retina_dispatcher: self-checking testbench for retina_dispatcher (2 x 2 dispatcher).
// Every input carries NEV events of random hits with random destination
// masks, closed by EndEvent words; outputs are held at random. Each hit is
// tagged (layer = input, x = sequence number, y = event) so the testbench can
// check, per output and per event, that exactly the hits whose mask selects
// that output arrive, once each, before that event's single EE, in their
// input order. Also checks the pipeline latency of 2*log2(N) cycles, copying
// (hits to several outputs) and stalling under hold.
module tb_retina_dispatcher;
  import retina_pkg::*;
  localparam int N = 2;
  localparam int K = $clog2(N);
  localparam int NEV = 40;

  logic clk = 0, rst = 1;
  logic  [N-1:0] in_live, in_valid, in_hold, out_live, out_valid, out_hold;
  word_t [N-1:0] in_data, out_data;
  logic ev_err;
  int checks = 0, failures = 0;

  retina_dispatcher #(.IDX(0), .STRIDE(1), .SEL_G(1'b1)) dut (
    .clk, .rst, .in_live, .in_valid, .in_data, .in_hold,
    .out_live, .out_valid, .out_data, .out_hold, .ev_err
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected[p][{ev,input,seq}]
  bit expected [N][int];
  int seqs [N][$];     // per input: queue of words still to send, encoded
  mask_t masks [N][$];
  int out_ev [N];
  int last_seq [N][N];
  int ees_seen = 0, copies = 0, stalls = 0;

  function automatic int key(int e, int i, int s);
    return (e << 16) | (i << 10) | s;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int lat;
    in_live = '1; in_valid = '0; in_data = '0; out_hold = '0;
    // build the stimulus
    for (int i = 0; i < N; i++) begin
      int s;
      s = 0;
      for (int e = 0; e < NEV; e++) begin
        int nh;
        nh = $urandom_range(6);
        for (int h = 0; h < nh; h++) begin
          mask_t m;
          m = mask_t'($urandom_range(2**N - 1));
          if ($urandom_range(3) == 0) m = '0;
          seqs[i].push_back(key(e, i, s));
          masks[i].push_back(m);
          for (int p = 0; p < N; p++) if (m[p]) expected[p][key(e, i, s)] = 1;
          if ($countones(m) > 1) copies++;
          s++;
        end
        seqs[i].push_back(-1 - e);   // EE of event e
        masks[i].push_back('0);
      end
    end
    for (int p = 0; p < N; p++) begin
      out_ev[p] = 0;
      for (int i = 0; i < N; i++) last_seq[p][i] = -1;
    end
    repeat (3) @(negedge clk);
    rst = 0;

    // latency: one hit from input 0 to output N-1
    @(negedge clk);
    in_valid[0] = 1;
    in_data[0] = '0;
    in_data[0].layer = '0; in_data[0].x = 1023; in_data[0].y = 1023;
    in_data[0].bmask = mask_t'(1) << (N - 1);
    in_data[0].gmask = mask_t'(1) << (N - 1);
    lat = 0;
    @(negedge clk);
    in_valid[0] = 0;
    lat = 1;
    while (!out_valid[N-1] && lat < 50) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 2 * K, $sformatf("latency %0d, expected %0d", lat, 2 * K));
    check(out_data[N-1].x == 1023 && out_valid == (N'(1) << (N - 1)),
          "latency probe on the wrong output");
    @(negedge clk);

    // main run
    begin
      int done_cnt;
      logic [N-1:0] taken;
      done_cnt = 0;
      taken = '0;
      while (done_cnt < N) begin
        // drive
        for (int i = 0; i < N; i++) begin
          if (!in_valid[i] || taken[i]) begin
            if (in_valid[i]) begin
              void'(seqs[i].pop_front());
              void'(masks[i].pop_front());
            end
            in_valid[i] = 0;
            if (seqs[i].size() > 0 && $urandom_range(3) != 0) begin
              int w;
              w = seqs[i][0];
              in_valid[i] = 1;
              in_data[i] = '0;
              if (w < 0) begin
                in_data[i].ee = 1;
                in_data[i].ev = ev_t'(-1 - w);
              end else begin
                in_data[i].layer = 4'(w >> 10 & 15);
                in_data[i].x = 10'(w & 1023);
                in_data[i].y = 10'(w >> 16);
                in_data[i].ev = ev_t'(w >> 16);
                in_data[i].bmask = masks[i][0];
                in_data[i].gmask = masks[i][0];
              end
            end
          end
        end
        for (int p = 0; p < N; p++) out_hold[p] = ($urandom_range(4) == 0);
        #1;
        if (|(in_valid & in_hold)) stalls++;
        taken = in_valid & ~in_hold;
        // sample transfers that happen at the next edge
        for (int p = 0; p < N; p++)
          if (out_valid[p] && !out_hold[p]) begin
            if (out_data[p].ee) begin
              check(int'(out_data[p].ev) == out_ev[p] % 256,
                    $sformatf("out %0d EE ev %0d expected %0d", p, out_data[p].ev, out_ev[p]));
              // all hits of this event must be out already
              foreach (expected[p][k])
                check(!((k >> 16) == out_ev[p]),
                      $sformatf("out %0d: EE of event %0d before hit %0h", p, out_ev[p], k));
              out_ev[p]++;
              ees_seen++;
              for (int i = 0; i < N; i++) last_seq[p][i] = -1;
              if (out_ev[p] == NEV) done_cnt++;
            end else begin
              int k, i, s;
              i = int'(out_data[p].layer);
              s = int'(out_data[p].x);
              k = key(int'(out_data[p].y), i, s);
              check(expected[p].exists(k) && int'(out_data[p].y) == out_ev[p],
                    $sformatf("out %0d: unexpected hit %0h", p, k));
              check(s > last_seq[p][i], $sformatf("out %0d: order from input %0d", p, i));
              last_seq[p][i] = s;
              expected[p].delete(k);
            end
          end
        @(negedge clk);
      end
    end
    for (int p = 0; p < N; p++)
      check(expected[p].num() == 0, $sformatf("out %0d: %0d hits missing", p, expected[p].num()));
    check(copies > 0 && stalls > 0, "no copying or no stall exercised");
    check(ev_err == 0, "spurious event-mixing flag");
    $display("events=%0d copied_hits=%0d stall_cycles=%0d", NEV, copies, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
