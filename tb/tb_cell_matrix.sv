// tb_cell_matrix: self-checking testbench for cell_matrix with 1 x 2 groups
// of 2 x 3 engines at global cell (10, 20). Each event's hits (generated
// along tracks through the block) are broadcast to both groups, then EE.
// For every event the frame must equal the reference excitations and carry
// the event number. The frame is acknowledged after a random delay while the
// next event is already flowing in; the EE of that next event must be held
// meanwhile (counted), and nothing may be lost.
module tb_cell_matrix;
  import retina_pkg::*;
  import tb_retina_ref_pkg::*;
  localparam int GR = 2, GC = 3, NG = 2, ROW0 = 10, COL0 = 20;
  localparam int ROWS = GR, COLS = GC * NG;
  localparam int NEV = 30;
  logic clk = 0, rst = 1;
  logic [NG-1:0] in_valid, in_hold;
  word_t [NG-1:0] in_data;
  logic frame_valid, frame_ack, ev_err;
  logic [ROWS*COLS-1:0][EXC_W-1:0] frame;
  ev_t frame_ev;
  int checks = 0, failures = 0;
  int ee_holds = 0;
  hit_t ev_hits [NEV][$];

  cell_matrix #(.G_ROWS(1), .G_COLS(NG), .GR(GR), .GC(GC), .ROW0(ROW0), .COL0(COL0)) dut (.*);

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
    in_valid = 0; in_data = '0; frame_ack = 0;
    for (int e = 0; e < NEV; e++) begin
      int nt;
      nt = $urandom_range(2);
      for (int t = 0; t < nt; t++)
        make_track(ROW0 + $urandom_range(ROWS - 1), COL0 + $urandom_range(COLS - 1),
                   $urandom_range(16) - 8, $urandom_range(16) - 8, ev_hits[e]);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    fork
      begin : driver
        for (int e = 0; e < NEV; e++) begin
          for (int k = 0; k <= ev_hits[e].size(); k++) begin
            word_t w;
            w = '0;
            if (k == ev_hits[e].size()) begin
              w.ee = 1; w.ev = ev_t'(e);
            end else begin
              w.layer = 4'(ev_hits[e][k].layer);
              w.x = 10'(ev_hits[e][k].x); w.y = 10'(ev_hits[e][k].y);
            end
            in_valid = '1; in_data = {w, w};
            #1;
            while (in_hold != 0) begin
              if (w.ee) ee_holds++;
              check(w.ee, "a hit was held");
              @(negedge clk); #1;
            end
            @(negedge clk);
          end
          in_valid = 0;
        end
      end
      begin : consumer
        for (int e = 0; e < NEV; e++) begin
          int f[];
          @(negedge clk); #2;
          while (!frame_valid) begin @(negedge clk); #2; end
          ref_frame(ev_hits[e], ROW0, COL0, ROWS, COLS, f);
          check(frame_ev == ev_t'(e), "frame event number");
          for (int i = 0; i < ROWS * COLS; i++)
            check(int'(frame[i]) == f[i],
                  $sformatf("event %0d cell %0d: %0d expected %0d", e, i, frame[i], f[i]));
          repeat ($urandom_range(40)) @(negedge clk);
          #2 frame_ack = 1;
          @(negedge clk);
          #2 frame_ack = 0;
        end
      end
    join
    check(ee_holds > 0, "EE hold never exercised");
    check(!ev_err, "spurious ev_err");
    $display("ee_hold_cycles=%0d", ee_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
