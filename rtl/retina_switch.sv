// retina_switch: N-input, N-output distribution network built from
// dispatchers, with the topology of the recursive retina switch: an N-port
// switch is two N/2 sub-switches followed by a layer of N/2 dispatchers,
// where output i of the left sub-switch feeds input L of dispatcher i, output
// i of the right one feeds input R, and dispatcher i drives outputs 2i, 2i+1.
// A 2-port switch is one dispatcher. Every hit can reach every output, and
// copies are made only where routes diverge.
//
// The recursion is unrolled into log2(N) stages. Stage s works on blocks of
// B = 2^(s+1) ports; dispatcher i of the block at base takes ports base+i and
// base+B/2+i of the previous stage and drives ports base+2i, base+2i+1. Each
// stage is a pipeline stage: latency 2*log2(N) cycles, one word per cycle per
// port, whatever N is. Routing uses the destination mask selected by SEL_G,
// one bit per network output (bit p = output p). N must be a power of two.
// The wiring follows the published 4- and 8-port drawings.
module retina_switch
  import retina_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter bit          SEL_G = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  [N-1:0] in_live,
  input  logic  [N-1:0] in_valid,
  input  word_t [N-1:0] in_data,
  output logic  [N-1:0] in_hold,
  output logic  [N-1:0] out_live,
  output logic  [N-1:0] out_valid,
  output word_t [N-1:0] out_data,
  input  logic  [N-1:0] out_hold,
  output logic  ev_err
);
  localparam int unsigned K = $clog2(N);

  // port signals between stages; index 0 = network inputs, K = outputs
  logic  [K:0][N-1:0] pl, pv, ph;
  word_t [K:0][N-1:0] pd;
  logic  [K-1:0][N/2-1:0] d_err;

  assign pl[0] = in_live;
  assign pv[0] = in_valid;
  assign pd[0] = in_data;
  assign in_hold = ph[0];

  for (genvar s = 0; s < K; s++) begin : g_stage
    localparam int unsigned B = 2 ** (s + 1);
    for (genvar b = 0; b < N / B; b++) begin : g_block
      for (genvar i = 0; i < B / 2; i++) begin : g_disp
        localparam int unsigned PL = b * B + i;          // input L port
        localparam int unsigned PR = b * B + B / 2 + i;  // input R port
        localparam int unsigned PO = b * B + 2 * i;      // output ports
        logic [1:0] dh;
        retina_dispatcher #(.IDX(i), .STRIDE(N / B), .SEL_G(SEL_G)) u_d (
          .clk, .rst,
          .in_live  ({pl[s][PR], pl[s][PL]}),
          .in_valid ({pv[s][PR], pv[s][PL]}),
          .in_data  ({pd[s][PR], pd[s][PL]}),
          .in_hold  (dh),
          .out_live (pl[s+1][PO +: 2]),
          .out_valid(pv[s+1][PO +: 2]),
          .out_data (pd[s+1][PO +: 2]),
          .out_hold (ph[s+1][PO +: 2]),
          .ev_err   (d_err[s][b * B / 2 + i])
        );
        assign ph[s][PL] = dh[0];
        assign ph[s][PR] = dh[1];
      end
    end
  end

  assign out_live  = pl[K];
  assign out_valid = pv[K];
  assign out_data  = pd[K];
  assign ph[K]     = out_hold;
  assign ev_err    = |d_err;
endmodule
