// tb_hit_source: self-checking testbench for hit_source (RAM of 64 words,
// input FIFO of 8). The host loads two events (7 words) into the RAM.
//  1 RAM loop: the words must come out in RAM order, wrapping after
//    ram_len, every word stamped with the running event number, masks
//    cleared, under random output holds.
//  2 mode switch to the input FIFO in the middle of an event: the current
//    event must be finished from RAM first, then the host's words follow
//    exactly as pushed (host event numbers kept); the FIFO must push back
//    when full.
//  3 switch back to RAM: reading resumes where it stopped.
//  4 run = 0: the source stops at the next EE.
module tb_hit_source;
  import retina_pkg::*;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0, rst = 1;
  logic mode, run, stop_en, ram_we, fifo_valid, fifo_hold, out_valid, out_hold, cur_mode;
  logic [AW:0] ram_len;
  ev_t ev_stop;
  logic [AW-1:0] ram_addr;
  word_t ram_wdata, fifo_data, out_data;
  int checks = 0, failures = 0;
  word_t ram[7];
  word_t got[$];

  hit_source #(.DEPTH(DEPTH), .FIFO_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // collector: random holds, records every word that leaves
  bit collect = 0, stall = 0;
  always @(negedge clk) if (collect) begin
    out_hold = stall || $urandom_range(2) == 0;
    #1 if (out_valid && !out_hold) got.push_back(out_data);
  end

  function automatic word_t ram_word(int i, int ev);
    word_t w;
    w = ram[i % 7];
    w.ev = ev_t'(ev); w.bmask = '0; w.gmask = '0;
    return w;
  endfunction

  initial begin
    int ri, rev, n, fifo_full_seen;
    word_t host[$];
    mode = 0; run = 0; stop_en = 0; ev_stop = '0; ram_we = 0; fifo_valid = 0; out_hold = 0; ram_len = 7;
    ram_addr = '0; ram_wdata = '0; fifo_data = '0;
    for (int i = 0; i < 7; i++) begin
      ram[i] = '0;
      ram[i].ee = (i == 3 || i == 6);
      ram[i].layer = 4'(i); ram[i].x = 10'($urandom); ram[i].y = 10'($urandom);
      ram[i].ev = 8'hAA; ram[i].bmask = 8'hFF; ram[i].gmask = 8'h0F;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 7; i++) begin
      ram_we = 1; ram_addr = AW'(i); ram_wdata = ram[i];
      @(negedge clk);
    end
    ram_we = 0;
    // 1: loop
    collect = 1; run = 1;
    wait (got.size() >= 40);
    // 2: switch to the FIFO in the middle of an event
    // switch right after the first hit of the 3-hit event left: the source
    // is then in the middle of that event
    @(negedge clk);
    while (got[$].ee || got[$].layer != 4'd0) @(negedge clk);
    mode = 1;
    // push host words; the FIFO must fill up while the RAM event finishes
    fifo_full_seen = 0;
    stall = 1;
    for (int k = 0; k < 12; k++) begin
      word_t w;
      w = '0; w.ev = 8'(200 + k / 4); w.ee = (k % 4 == 3); w.x = 10'(k);
      host.push_back(w);
      fifo_valid = 1; fifo_data = w;
      #2;
      while (fifo_hold) begin fifo_full_seen++; stall = 0; @(negedge clk); #2; end
      @(negedge clk);
    end
    fifo_valid = 0;
    check(cur_mode == 1 || got.size() > 0, "mode");
    repeat (40) @(negedge clk);
    // 3: back to RAM
    mode = 0;
    repeat (40) @(negedge clk);
    // 4: stop
    run = 0;
    repeat (40) @(negedge clk);
    // 5: run again, pausing before event number rev_stop
    stop_en = 1; ev_stop = got[$].ev + 8'd4; run = 1;
    repeat (80) @(negedge clk);
    collect = 0;
    out_hold = 0;
    repeat (5) @(negedge clk);

    // ---- check the recorded stream ----
    ri = 0; rev = 0; n = 0;
    // RAM words until the FIFO words begin
    while (n < got.size() && got[n].ev < 8'd200) begin
      check(got[n] == ram_word(ri, rev), $sformatf("RAM word %0d", n));
      if (got[n].ee) rev++;
      ri++; n++;
    end
    check(n >= 40 && got[n-1].ee, "switch did not wait for the end of the event");
    for (int k = 0; k < 12; k++) begin
      check(n < got.size() && got[n] == host[k], $sformatf("host word %0d", k));
      n++;
    end
    // RAM resumes where it stopped
    while (n < got.size()) begin
      check(got[n] == ram_word(ri, rev), $sformatf("resumed RAM word %0d", n));
      if (got[n].ee) rev++;
      ri++; n++;
    end
    check(got[$].ee && got[$].ev == ev_stop - 1, "did not stop after the event before ev_stop");
    check(ri > 60, "RAM did not resume");
    check(fifo_full_seen > 0, "input FIFO never full");
    $display("words=%0d", got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
