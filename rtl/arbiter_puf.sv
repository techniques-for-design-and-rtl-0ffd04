// arbiter_puf: behavioural model of one row of the parallel (linear) arbiter
// PUF: an N-switch delay chain whose two path ends meet in an arbiter.
//
// A rising edge on launch races down both paths; the switch settings
// (challenge c) choose which physical links each path uses. The arbiter
// outputs r = 1 when the edge on the top path arrives first. r holds until
// the next rising launch edge; launch must go low, and both paths settle
// low, before the next evaluation. With the defaults (64 switches of
// 500 ps) the paths take about 32 ns.
//
// The defaults follow the simulated 65 nm secure PUF: 64 switches, each link
// delay Gaussian with mean 0.5 ns and deviation 4 ps, no extra delay
// elements. The arbiter's own deviation (1 ps) is this design's choice.
module arbiter_puf #(
  parameter int unsigned N         = 64,
  parameter int unsigned NINV      = 0,
  parameter int unsigned SEED      = 1,
  parameter real         MU_SW     = 500.0,
  parameter real         SIGMA_SW  = 4.0,
  parameter real         MU_INV    = 500.0,
  parameter real         SIGMA_INV = 4.0,
  parameter real         SIGMA_ARB = 1.0
) (
  input  logic         launch,
  input  logic [N-1:0] c,
  output logic         r
);
  timeunit 1ps;
  timeprecision 1fs;

  logic top_out, bot_out;

  puf_delay_chain #(
    .N(N), .NINV(NINV), .SEED(SEED), .MU_SW(MU_SW), .SIGMA_SW(SIGMA_SW),
    .MU_INV(MU_INV), .SIGMA_INV(SIGMA_INV)
  ) u_chain (
    .launch(launch), .c(c), .top_out(top_out), .bot_out(bot_out)
  );

  arbiter #(.SIGMA(SIGMA_ARB)) u_arb (.d(top_out), .g(bot_out), .q(r));
endmodule
