// tb_ee_checker: self-checking testbench for ee_checker. A clean stream of
// events (hits tagged with their event, EE with the event number), with
// stalls (hold) that must not count as transfers, then injected faults: a
// hit carrying another event's number (mixing), an EE with a wrong number
// (corruption), after which the checker must resynchronise. The error
// pulses and counters are compared with the injected faults.
module tb_ee_checker;
  import retina_pkg::*;
  logic clk = 0, rst = 1;
  logic valid, hold, ee_err, mix_err;
  word_t data;
  logic [15:0] ee_err_cnt, mix_err_cnt;
  int checks = 0, failures = 0;
  int n_ee = 0, n_mix = 0;

  ee_checker dut (.*);

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

  // send one word; expect the given error pulses one cycle later
  task automatic send(word_t w, bit exp_ee, bit exp_mix);
    valid = 1; data = w;
    hold = $urandom_range(3) == 0;
    while (hold) begin
      @(negedge clk);
      check(!ee_err && !mix_err, "error pulse without a transfer");
      hold = $urandom_range(3) == 0;
    end
    @(negedge clk);
    valid = 0;
    check(ee_err == exp_ee && mix_err == exp_mix,
          $sformatf("ev %0d ee=%0b: pulses ee=%0b mix=%0b expected %0b %0b",
                    w.ev, w.ee, ee_err, mix_err, exp_ee, exp_mix));
    n_ee += int'(exp_ee); n_mix += int'(exp_mix);
  endtask

  initial begin
    int ev;
    valid = 0; hold = 0; data = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    ev = 0;
    for (int e = 0; e < 300; e++) begin
      word_t w;
      int fault;
      fault = (e > 20) ? $urandom_range(9) : 0;   // 1: mix, 2: bad EE
      for (int h = 0; h < $urandom_range(4); h++) begin
        w = '0; w.ev = ev_t'(ev); w.x = 10'($urandom);
        send(w, 0, 0);
      end
      if (fault == 1) begin
        w = '0; w.ev = ev_t'(ev + 1 + $urandom_range(100));
        send(w, 0, 1);
      end
      w = '0; w.ee = 1;
      if (fault == 2) begin
        int bad;
        bad = ev + 2 + $urandom_range(50);
        w.ev = ev_t'(bad);
        send(w, 1, 0);
        ev = bad + 1;           // checker follows the received number
      end else begin
        w.ev = ev_t'(ev);
        send(w, 0, 0);
        ev++;
      end
    end
    check(int'(ee_err_cnt) == n_ee && int'(mix_err_cnt) == n_mix,
          $sformatf("counters %0d/%0d expected %0d/%0d", ee_err_cnt, mix_err_cnt, n_ee, n_mix));
    check(n_ee > 0 && n_mix > 0, "no fault injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
