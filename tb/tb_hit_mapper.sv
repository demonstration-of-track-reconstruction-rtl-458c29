// tb_hit_mapper: self-checking testbench for hit_mapper configured as the
// group mapper of board 3 (8 groups of 7 x 7 cells, 4 per row, board origin
// at cell (14, 28)). For random hits on random layers the expected mask is
// found by brute force: group g is selected when some cell of g has its
// receptor within the search distance in x and in y. EE words must pass
// with an empty mask; the other mask field must pass unchanged; random holds
// must not lose or repeat words.
module tb_hit_mapper;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int ROW0 = 14, COL0 = 28;
  logic clk = 0, rst = 1;
  logic in_valid, in_hold, out_valid, out_hold;
  word_t in_data, out_data;
  int checks = 0, failures = 0;
  word_t exp_q[$];

  hit_mapper #(.NT(8), .T_ROWS(7), .T_COLS(7), .T_PER_ROW(4),
               .ROW0(ROW0), .COL0(COL0), .SEL_G(1'b1)) dut (.*);

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

  function automatic mask_t ref_mask(int l, int x, int y);
    mask_t m;
    m = '0;
    for (int g = 0; g < 8; g++)
      for (int r = 0; r < 7; r++)
        for (int c = 0; c < 7; c++) begin
          int rr, cc;
          rr = ROW0 + (g / 4) * 7 + r;
          cc = COL0 + (g % 4) * 7 + c;
          if ((x - ref_receptor(cc, l)) <= 12 && (ref_receptor(cc, l) - x) <= 12 &&
              (y - ref_receptor(rr, l)) <= 12 && (ref_receptor(rr, l) - y) <= 12)
            m[g] = 1;
        end
    return m;
  endfunction

  initial begin
    bit taken;
    int multi, none;
    multi = 0; none = 0; taken = 0;
    in_valid = 0; in_data = '0; out_hold = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      if (!in_valid || taken) begin
        in_valid = $urandom_range(3) != 0;
        in_data = '0;
        in_data.layer = 4'($urandom_range(15));
        // mostly inside the board's receptor range, some outside
        in_data.x = 10'(ref_receptor(COL0, in_data.layer) - 20 + $urandom_range(310));
        in_data.y = 10'(ref_receptor(ROW0, in_data.layer) - 20 + $urandom_range(160));
        in_data.bmask = mask_t'($urandom);
        in_data.gmask = mask_t'($urandom);
        in_data.ee = $urandom_range(9) == 0;
      end
      out_hold = $urandom_range(3) == 0;
      #1;
      if (out_valid && !out_hold) begin
        check(exp_q.size() > 0 && out_data == exp_q[0],
              $sformatf("mask %b expected %b", out_data.gmask, exp_q[0].gmask));
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      taken = in_valid && !in_hold;
      if (taken) begin
        word_t w;
        w = in_data;
        w.gmask = w.ee ? '0 : ref_mask(int'(w.layer), int'(w.x), int'(w.y));
        if ($countones(w.gmask) > 1) multi++;
        if (!w.ee && w.gmask == 0) none++;
        exp_q.push_back(w);
      end
      @(negedge clk);
    end
    check(multi > 0 && none > 0, "no duplicated or no unrouted hit");
    $display("multi-target=%0d none=%0d", multi, none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
