// ee_checker: watches one hit channel and checks that events stay intact.
// It expects event numbers to follow each other: every hit must carry the
// number of the event in progress (otherwise hits of different events have
// been mixed, mix_err) and every EndEvent word must carry it too (otherwise
// the EE is corrupt, ee_err); after an EE the next number is expected. After
// a bad EE it resynchronises on the number received. The error outputs pulse
// for one cycle; the counters count since reset. Passive: it only observes a
// transfer (valid and not hold). The check follows the demonstrator's
// continuous EE and alignment monitoring; the event-number field is this
// design's own way of making it possible.
module ee_checker
  import retina_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  valid,
  input  word_t data,
  input  logic  hold,
  output logic  ee_err,
  output logic  mix_err,
  output logic [15:0] ee_err_cnt,
  output logic [15:0] mix_err_cnt
);
  ev_t exp_ev;
  logic xfer;
  assign xfer = valid && !hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      exp_ev <= '0; ee_err <= 1'b0; mix_err <= 1'b0;
      ee_err_cnt <= '0; mix_err_cnt <= '0;
    end else begin
      ee_err <= 1'b0; mix_err <= 1'b0;
      if (xfer && data.ee) begin
        exp_ev <= data.ev + 1'b1;
        if (data.ev != exp_ev) begin
          ee_err <= 1'b1;
          ee_err_cnt <= ee_err_cnt + 1'b1;
        end
      end else if (xfer && data.ev != exp_ev) begin
        mix_err <= 1'b1;
        mix_err_cnt <= mix_err_cnt + 1'b1;
      end
    end
  end
endmodule
