// tb_retina_merger: self-checking testbench for retina_merger.
// Phase 1, both inputs live: each input sends events of random hits and an
// EE; the output must hold every hit once, in per-input order, and exactly
// one EE per event, after all hits of that event from both inputs.
// Phase 2, input 1 not live: the EE of input 0 must pass without waiting.
// Phase 3: EEs with different event numbers must raise ev_err.
module tb_retina_merger;
  import retina_pkg::*;
  localparam int NEV = 60;
  logic clk = 0, rst = 1;
  logic [1:0] in_live, in_valid, in_hold;
  word_t [1:0] in_data;
  logic out_live, out_valid, out_hold, ev_err;
  word_t out_data;
  int checks = 0, failures = 0;

  retina_merger dut (.*);

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

  word_t src [2][$];
  int pending [int];   // hits of each event not yet out
  int last_x [2];
  int cur_ev, waits;
  bit errs;

  task automatic run(int nev, logic [1:0] live);
    bit [1:0] taken;
    cur_ev = 0; taken = 0;
    last_x[0] = -1; last_x[1] = -1;
    in_live = live;
    while (cur_ev < nev) begin
      for (int i = 0; i < 2; i++)
        if (!in_valid[i] || taken[i]) begin
          if (in_valid[i]) void'(src[i].pop_front());
          in_valid[i] = src[i].size() > 0 && $urandom_range(3) != 0;
          if (src[i].size() > 0) in_data[i] = src[i][0];
        end
      out_hold = $urandom_range(3) == 0;
      #1;
      for (int i = 0; i < 2; i++) if (in_valid[i] && in_data[i].ee && in_hold[i]) waits++;
      taken = in_valid & ~in_hold;
      if (out_valid && !out_hold) begin
        if (out_data.ee) begin
          check(int'(out_data.ev) == cur_ev, "EE event number");
          check(pending[cur_ev] == 0, $sformatf("EE of event %0d before its hits", cur_ev));
          cur_ev++;
          last_x[0] = -1; last_x[1] = -1;
        end else begin
          int i;
          i = int'(out_data.layer);
          check(int'(out_data.ev) == cur_ev, "hit of a later event overtook an EE");
          check(int'(out_data.x) > last_x[i], "per-input order");
          last_x[i] = int'(out_data.x);
          pending[int'(out_data.ev)]--;
        end
      end
      if (ev_err) errs = 1;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic build(logic [1:0] live, int nev, int bad_ev);
    for (int i = 0; i < 2; i++) begin
      int s;
      s = 0;
      if (!live[i]) continue;
      for (int e = 0; e < nev; e++) begin
        int nh;
        word_t w;
        nh = $urandom_range(5);
        for (int h = 0; h < nh; h++) begin
          w = '0; w.layer = 4'(i); w.x = 10'(s++); w.ev = ev_t'(e);
          src[i].push_back(w);
          pending[e]++;
        end
        w = '0; w.ee = 1; w.ev = ev_t'((i == 1 && e == bad_ev) ? e + 100 : e);
        src[i].push_back(w);
      end
    end
  endtask

  initial begin
    in_live = 2'b11; in_valid = 0; in_data = '0; out_hold = 0; waits = 0; errs = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int e = 0; e < NEV; e++) pending[e] = 0;
    build(2'b11, NEV, -1);
    run(NEV, 2'b11);
    check(waits > 0, "an EE never had to wait for the other input");
    check(!errs, "spurious ev_err");
    check(out_live, "out_live low with live inputs");
    // one live input
    pending.delete();
    for (int e = 0; e < 10; e++) pending[e] = 0;
    src[0].delete(); src[1].delete();
    build(2'b01, 10, -1);
    run(10, 2'b01);
    check(!errs, "spurious ev_err with one live input");
    // mismatched event numbers
    pending.delete();
    for (int e = 0; e < 4; e++) pending[e] = 0;
    build(2'b11, 4, 2);
    in_live = 2'b11;
    begin
      int cyc;
      bit [1:0] taken;
      taken = 0;
      for (cyc = 0; cyc < 200; cyc++) begin
        for (int i = 0; i < 2; i++)
          if (!in_valid[i] || taken[i]) begin
            if (in_valid[i]) void'(src[i].pop_front());
            in_valid[i] = src[i].size() > 0;
            if (src[i].size() > 0) in_data[i] = src[i][0];
          end
        out_hold = 0;
        #1 taken = in_valid & ~in_hold;
        if (ev_err) errs = 1;
        @(negedge clk);
      end
    end
    check(errs, "ev_err not raised for mismatched EE numbers");
    in_live = 2'b00;
    #1 check(!out_live, "out_live high with no live input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
