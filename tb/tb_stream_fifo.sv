// tb_stream_fifo: self-checking testbench for stream_fifo (DEPTH 8).
// Random pushes and random output holds; the data leaving must equal a
// queue model word for word. Also checks that in_hold rises exactly when the
// FIFO holds DEPTH words, that count follows the model, and that a word
// written into an empty FIFO is visible at the output one cycle later.
module tb_stream_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic in_valid, in_hold, out_valid, out_hold;
  logic [15:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int fulls = 0;

  stream_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

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
    in_valid = 0; in_data = 0; out_hold = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // latency: write one word, see it next cycle
    in_valid = 1; in_data = 16'hbeef;
    #1 check(!out_valid, "empty FIFO shows data");
    @(negedge clk);
    in_valid = 0;
    #1 check(out_valid && out_data == 16'hbeef, "fall-through after one cycle");
    out_hold = 0;
    @(negedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit phase_fill;
      phase_fill = (cyc / 500) % 2 == 0;
      in_valid = $urandom_range(3) != 0;
      in_data  = 16'($urandom);
      out_hold = phase_fill ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      #1;
      check(int'(count) == model.size(), "count differs from model");
      check(in_hold == (model.size() == DEPTH), "in_hold not equal to full");
      if (in_hold) fulls++;
      check(out_valid == (model.size() != 0), "out_valid wrong");
      if (out_valid && !out_hold) begin
        check(out_data == model[0], $sformatf("data %h expected %h", out_data, model[0]));
        void'(model.pop_front());
      end
      if (in_valid && !in_hold) model.push_back(in_data);
      @(negedge clk);
    end
    check(fulls > 0, "FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
