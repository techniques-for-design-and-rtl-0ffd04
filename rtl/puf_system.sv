// puf_system: top level. Two parts that serve the same PUF flow stand side
// by side, each with its own ports:
//
//  * the secure PUF (64-bit challenge, 9 rows, 8 output bits) behind the
//    clocked evaluation controller that returns time-stamped responses;
//  * the delay characterization circuit, clocked from a swept external clock
//    through the PLL model, that measures a PUF under test and reports two
//    error counts every 512 cycles.
//
// In the source these are two FPGA configurations of the same chip:
// characterization first, then the secure PUF with its networks. Here both
// exist at once. The authentication server that stores the measured delays
// and predicts responses, the external swept clock generator and the logic
// analyzer are outside this design; their signals are ports.
//
// Secure PUF timing: clk period must exceed the PUF path delay plus the
// arbiter settling time (64 x 0.5 ns = 32 ns with the defaults, so at most
// about 30 MHz with EVAL_CYCLES = 1).
module puf_system
  import puf_pkg::*;
#(
  parameter int unsigned N           = 64,
  parameter int unsigned Q           = 9,
  parameter int unsigned QP          = 8,
  parameter int unsigned X           = 8,
  parameter int unsigned S           = 1,
  parameter in_net_e     KIND        = NET_XOR,
  parameter int unsigned EVAL_CYCLES = 1,
  parameter int unsigned STAMP_W     = 32,
  parameter int unsigned CHAR_N      = 8,
  parameter int unsigned CHAR_NINV   = 6
) (
  // secure PUF, system clock domain
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [N-1:0]       req_challenge,
  output logic               rsp_valid,
  output logic [QP-1:0]      rsp_response,
  output logic [STAMP_W-1:0] rsp_stamp,
  output logic [7:0]         rsp_latency,
  output logic [Q-1:0]       row_responses,
  // characterization circuit
  input  logic               char_ext_clk,
  input  logic               char_rst_n,
  input  logic               char_synch,
  output logic               char_sys_clk,
  output logic               char_pll_locked,
  output logic [CHAR_N-1:0]  char_challenge,
  output logic               char_read,
  output logic [7:0]         char_c1,
  output logic [7:0]         char_c2,
  output logic               char_err1,
  output logic               char_err2,
  output logic               char_chal_adv
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N-1:0]  puf_challenge;
  logic          puf_launch;
  logic [QP-1:0] puf_o;

  puf_eval_ctrl #(.N(N), .QP(QP), .EVAL_CYCLES(EVAL_CYCLES), .STAMP_W(STAMP_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .req_valid(req_valid), .req_ready(req_ready), .req_challenge(req_challenge),
    .puf_challenge(puf_challenge), .puf_launch(puf_launch), .puf_response(puf_o),
    .rsp_valid(rsp_valid), .rsp_response(rsp_response), .rsp_stamp(rsp_stamp),
    .rsp_latency(rsp_latency)
  );

  secure_puf #(.N(N), .Q(Q), .QP(QP), .X(X), .S(S), .KIND(KIND)) u_puf (
    .launch(puf_launch), .challenge(puf_challenge), .r(row_responses), .o(puf_o)
  );

  char_circuit #(.N(CHAR_N), .NINV(CHAR_NINV)) u_char (
    .ext_clk(char_ext_clk), .rst_n(char_rst_n), .synch(char_synch),
    .sys_clk(char_sys_clk), .pll_locked(char_pll_locked), .challenge(char_challenge),
    .read(char_read), .c1(char_c1), .c2(char_c2),
    .err1(char_err1), .err2(char_err2), .chal_adv(char_chal_adv)
  );
endmodule
