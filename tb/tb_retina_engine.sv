// tb_retina_engine: self-checking testbench for retina_engine (cell at row
// 20, column 33). Sends events of hits spread around the cell's receptors
// (some inside, some beyond the search distance), with idle gaps, and checks
// the excitation latched at each EE against the reference sum of Gaussian
// weights, the event number, and that exc_valid comes exactly three cycles
// after the EE is presented.
module tb_retina_engine;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int ROW = 20, COL = 33;
  logic clk = 0, rst = 1;
  logic in_valid, exc_valid;
  word_t in_data;
  logic [EXC_W-1:0] exc;
  ev_t exc_ev;
  int checks = 0, failures = 0;

  retina_engine #(.ROW(ROW), .COL(COL)) dut (.*);

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
    int nonzero, saturated;
    nonzero = 0; saturated = 0;
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int e = 0; e < 200; e++) begin
      int expect_sum, nh, lat;
      hit_t h;
      expect_sum = 0;
      nh = (e % 50 == 49) ? 40 : $urandom_range(24);
      for (int k = 0; k < nh; k++) begin
        h.layer = $urandom_range(15);
        h.x = ref_receptor(COL, h.layer) + $urandom_range(36) - 18;
        h.y = ref_receptor(ROW, h.layer) + $urandom_range(36) - 18;
        if (e % 50 == 49) begin
          h.x = ref_receptor(COL, h.layer);
          h.y = ref_receptor(ROW, h.layer);
        end
        expect_sum += ref_weight(h, ROW, COL);
        in_valid = 1;
        in_data = '0;
        in_data.layer = 4'(h.layer); in_data.x = 10'(h.x); in_data.y = 10'(h.y);
        @(negedge clk);
        if ($urandom_range(3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
      end
      if (expect_sum > 255) begin expect_sum = 255; saturated++; end
      if (expect_sum > 0) nonzero++;
      in_valid = 1; in_data = '0; in_data.ee = 1; in_data.ev = ev_t'(e);
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!exc_valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("EE to exc_valid %0d cycles", lat));
      check(int'(exc) == expect_sum, $sformatf("event %0d: exc %0d expected %0d", e, exc, expect_sum));
      check(exc_ev == ev_t'(e), "event number");
      @(negedge clk);
      check(!exc_valid, "exc_valid longer than one cycle");
    end
    check(nonzero > 100 && saturated > 0, "stimulus too weak");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
