// tb_cluster_finder: self-checking testbench for cluster_finder on a 5 x 6
// block at global cell (3, 7), threshold 64. Frames hold low noise plus a
// few peaks, including flat tops (equal neighbours) and peaks on the block
// edge. The candidates leaving must equal the brute-force reference (cells,
// centroid offsets, peak values, row-major order), followed by one EE with
// the frame's event number. Outputs are held at random. Also checks that
// frame_ack answers an idle finder in the same cycle, and that a frame with
// k candidates leaves in k+1 output cycles when never held.
module tb_cluster_finder;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int ROWS = 5, COLS = 6, ROW0 = 3, COL0 = 7, TH = 64;
  logic clk = 0, rst = 1;
  logic frame_valid, frame_ack, out_valid, out_hold;
  logic [ROWS*COLS-1:0][EXC_W-1:0] frame;
  ev_t frame_ev;
  track_t out_data;
  int checks = 0, failures = 0;

  cluster_finder #(.ROWS(ROWS), .COLS(COLS), .ROW0(ROW0), .COL0(COL0), .THRESH(TH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int total, plateaus;
    total = 0; plateaus = 0;
    frame_valid = 0; frame = '0; frame_ev = '0; out_hold = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int e = 0; e < 300; e++) begin
      int f[];
      trk_t t[$];
      bit hold_free;
      int cyc, kk;
      f = new[ROWS * COLS];
      foreach (f[i]) f[i] = $urandom_range(30);
      for (int p = 0; p < $urandom_range(4); p++) begin
        int r, c, pk;
        r = $urandom_range(ROWS - 1); c = $urandom_range(COLS - 1);
        pk = 50 + $urandom_range(205);
        f[r * COLS + c] = pk;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS)
              f[(r + dr) * COLS + c + dc] = $urandom_range(3) == 0 ? pk : pk / 2 + $urandom_range(pk / 2);
        if (e % 7 == 0) plateaus++;
      end
      for (int i = 0; i < ROWS * COLS; i++) frame[i] = 8'(f[i]);
      ref_tracks(f, ROWS, COLS, ROW0, COL0, TH, t);
      total += t.size();
      kk = t.size();
      frame_ev = ev_t'(e);
      frame_valid = 1;
      #1 check(frame_ack, "idle finder did not take the frame at once");
      @(negedge clk);
      frame_valid = 0;
      hold_free = (e % 3 == 0);
      cyc = 0;
      forever begin
        out_hold = hold_free ? 0 : ($urandom_range(2) == 0);
        #1;
        cyc++;
        if (out_valid && !out_hold) begin
          if (out_data.ee) begin
            check(t.size() == 0, $sformatf("event %0d: EE with %0d candidates missing", e, t.size()));
            check(out_data.ev == ev_t'(e), "EE event number");
            // one candidate per cycle: k candidates then EE, one cycle after the copy
            if (hold_free) check(cyc == kk + 2, $sformatf("%0d candidates took %0d cycles", kk, cyc));
            @(negedge clk);
            break;
          end else begin
            check(t.size() > 0, "extra candidate");
            if (t.size() > 0) begin
              check(int'(out_data.row) == t[0].row && int'(out_data.col) == t[0].col &&
                    int'(out_data.du) == t[0].du && int'(out_data.dv) == t[0].dv &&
                    int'(out_data.peak) == t[0].peak && out_data.ev == ev_t'(e),
                    $sformatf("event %0d: got (%0d,%0d,%0d,%0d) expected (%0d,%0d,%0d,%0d)", e,
                      int'(out_data.row), int'(out_data.col), int'(out_data.du), int'(out_data.dv),
                      t[0].row, t[0].col, t[0].du, t[0].dv));
              void'(t.pop_front());
            end
          end
        end
        @(negedge clk);
      end
    end
    check(total > 100, "too few candidates in the stimulus");
    $display("candidates=%0d", total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
