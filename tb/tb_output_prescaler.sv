// tb_output_prescaler: self-checking testbench for output_prescaler. Streams
// events of 0..3 tracks plus EE with prescale 3, then 1, then 0, with random
// output holds. Expected: with prescale P > 1 exactly the events 0, P, 2P ...
// (counted from the setting) come out whole, the others vanish whole and are
// counted in dropped; with P <= 1 everything passes.
module tb_output_prescaler;
  import retina_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] prescale;
  logic in_valid, in_hold, out_valid, out_hold;
  track_t in_data, out_data;
  logic [31:0] dropped;
  int checks = 0, failures = 0;
  int exp_drop = 0;

  output_prescaler dut (.*);

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

  task automatic run(int p, int nev, int ev0);
    prescale = 8'(p);
    for (int e = 0; e < nev; e++) begin
      int nt;
      bit keep;
      keep = (p <= 1) || (e % p == 0);
      if (!keep) exp_drop++;
      nt = $urandom_range(3);
      for (int k = 0; k <= nt; k++) begin
        track_t w;
        w = '0;
        w.ev = ev_t'(ev0 + e);
        if (k == nt) w.ee = 1; else begin w.row = 6'($urandom); w.col = 6'($urandom); end
        in_valid = 1; in_data = w;
        forever begin
          out_hold = $urandom_range(2) == 0;
          #1;
          if (!keep) check(!out_valid, "word of a dropped event passed");
          else if (!in_hold) check(out_valid && out_data == w, "word of a kept event lost");
          if (!in_hold) break;
          @(negedge clk);
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0; out_hold = 0; prescale = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    run(3, 31, 0);
    check(dropped == 32'(exp_drop), $sformatf("dropped %0d expected %0d", dropped, exp_drop));
    run(1, 10, 30);
    run(0, 10, 40);
    check(dropped == 32'(exp_drop), "events dropped with prescale <= 1");
    check(exp_drop == 20, "stimulus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
