// puf_delay_chain: behavioural model of the two parallel delay paths of an
// arbiter PUF (the "PUF under test" of the characterization circuit and the
// body of every row of the secure PUF).
//
// A launch edge enters both paths at once. It crosses N switches; challenge
// bit c[k] sets switch k (c[0] is the switch nearest the launch point, the
// source's c_1). After every switch each path runs through a delay element of
// NINV inverters. top_out and bot_out are the two path ends, which feed an
// arbiter or, in the test circuit, two sample flip flops.
//
// Switch delays are drawn from N(MU_SW, SIGMA_SW) and inverter delays from
// N(MU_INV, SIGMA_INV), per instance, from SEED. The defaults are those of
// the measured FPGA circuit: 8 switches, 6 inverters after each switch, and
// element delays whose sum gives its 10.41 ns mean path delay and 0.068 ns
// deviation. Placing the delay elements after (not before) each switch is
// this design's choice.
module puf_delay_chain
  import puf_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned NINV      = 6,
  parameter int unsigned SEED      = 1,
  parameter real         MU_SW     = 186.0,
  parameter real         SIGMA_SW  = 9.1,
  parameter real         MU_INV    = 186.0,
  parameter real         SIGMA_INV = 9.1
) (
  input  logic         launch,
  input  logic [N-1:0] c,
  output logic         top_out,
  output logic         bot_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N:0] top, bot;
  assign top[0] = launch;
  assign bot[0] = launch;

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic st, sb;
    puf_switch #(
      .D00(switch_delay(MU_SW, SIGMA_SW, SEED, k, 0)),
      .D01(switch_delay(MU_SW, SIGMA_SW, SEED, k, 1)),
      .D10(switch_delay(MU_SW, SIGMA_SW, SEED, k, 2)),
      .D11(switch_delay(MU_SW, SIGMA_SW, SEED, k, 3))
    ) u_sw (
      .in0(top[k]), .in1(bot[k]), .sel(c[k]), .out0(st), .out1(sb)
    );
    if (NINV > 0) begin : g_del
      delay_element #(.NINV(NINV), .MU(MU_INV), .SIGMA(SIGMA_INV), .SEED(SEED),
                      .STAGE(k), .PATH(0)) u_dt (.a(st), .y(top[k+1]));
      delay_element #(.NINV(NINV), .MU(MU_INV), .SIGMA(SIGMA_INV), .SEED(SEED),
                      .STAGE(k), .PATH(1)) u_db (.a(sb), .y(bot[k+1]));
    end else begin : g_nodel
      assign top[k+1] = st;
      assign bot[k+1] = sb;
    end
  end

  assign top_out = top[N];
  assign bot_out = bot[N];
endmodule
