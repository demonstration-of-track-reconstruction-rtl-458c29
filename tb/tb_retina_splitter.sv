// tb_retina_splitter: self-checking testbench for retina_splitter with
// LO = 1, STRIDE = 2 (output 0 serves mask bits 3:2, output 1 bits 5:4).
// Random hits, random masks, EE words and random holds on both outputs.
// Expected: output o receives, in order, exactly the hits with a bit set in
// its block plus every EE; hits wanted by no output vanish. Also checks the
// one-cycle latency and that a hit sent to both outputs waits for both.
module tb_retina_splitter;
  import retina_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_hold;
  word_t in_data;
  logic [1:0] out_valid, out_hold;
  word_t [1:0] out_data;
  int checks = 0, failures = 0;
  word_t exp_q [2][$];
  int both = 0, dropped = 0, stalls = 0;

  retina_splitter #(.LO(1), .STRIDE(2), .SEL_G(1'b0)) dut (.*);

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

  initial begin
    bit taken;
    in_valid = 0; in_data = '0; out_hold = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    in_valid = 1; in_data = '0; in_data.bmask = 8'b0001_0000; in_data.x = 10'd77;
    @(negedge clk);
    in_valid = 0;
    #1 check(out_valid == 2'b10 && out_data[1].x == 10'd77, "one-cycle latency to output 1");
    @(negedge clk);
    #1;
    taken = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      if (!in_valid || taken) begin
        in_valid = $urandom_range(2) != 0;
        in_data = '0;
        in_data.x = 10'($urandom);
        in_data.bmask = mask_t'($urandom);
        in_data.ee = $urandom_range(7) == 0;
      end
      out_hold = 2'($urandom);
      #1;
      if (in_valid && in_hold) stalls++;
      for (int o = 0; o < 2; o++)
        if (out_valid[o] && !out_hold[o]) begin
          check(exp_q[o].size() > 0 && out_data[o] == exp_q[o][0],
                $sformatf("output %0d word mismatch", o));
          if (exp_q[o].size() > 0) void'(exp_q[o].pop_front());
        end
      taken = in_valid && !in_hold;
      if (taken) begin
        bit w0, w1;
        w0 = in_data.ee || (in_data.bmask[3:2] != 0);
        w1 = in_data.ee || (in_data.bmask[5:4] != 0);
        if (w0) exp_q[0].push_back(in_data);
        if (w1) exp_q[1].push_back(in_data);
        if (w0 && w1) both++;
        if (!w0 && !w1) dropped++;
      end
      @(negedge clk);
    end
    if (!taken) begin
      // let the last word in
      out_hold = 0;
      while (in_valid && in_hold) #1;
      for (int o = 0; o < 2; o++)
        if (out_valid[o]) begin
          check(exp_q[o].size() > 0 && out_data[o] == exp_q[o][0], "drain mismatch");
          if (exp_q[o].size() > 0) void'(exp_q[o].pop_front());
        end
      begin
        bit w0, w1;
        w0 = in_data.ee || (in_data.bmask[3:2] != 0);
        w1 = in_data.ee || (in_data.bmask[5:4] != 0);
        if (w0 && in_valid) exp_q[0].push_back(in_data);
        if (w1 && in_valid) exp_q[1].push_back(in_data);
      end
      @(negedge clk);
    end
    in_valid = 0; out_hold = 0;
    repeat (3) begin
      #1;
      for (int o = 0; o < 2; o++)
        if (out_valid[o]) begin
          check(exp_q[o].size() > 0 && out_data[o] == exp_q[o][0], "drain mismatch");
          if (exp_q[o].size() > 0) void'(exp_q[o].pop_front());
        end
      @(negedge clk);
    end
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "words missing at the end");
    check(both > 0 && dropped > 0 && stalls > 0, "copy, drop or stall never exercised");
    $display("copied=%0d dropped=%0d stalls=%0d", both, dropped, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
