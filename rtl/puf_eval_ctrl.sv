// puf_eval_ctrl: clocked front end that evaluates the secure PUF and time
// stamps each response, for timed authentication.
//
// An arbiter PUF answers within one clock cycle when the clock period is
// longer than its path delay; a verifier who also knows when the answer was
// produced can reject answers that took longer than real hardware needs
// (software emulation). This controller takes a challenge with a
// valid/ready handshake, applies it to the PUF with launch low (SETUP, one
// cycle), raises launch (EVAL, EVAL_CYCLES cycles), captures the PUF output
// at the end of EVAL, and returns it with two stamps: the free-running cycle
// counter at capture and the number of cycles from launch to capture.
// launch then returns low. The PUF's path delay plus arbiter settling must
// be shorter than EVAL_CYCLES clock periods, and the low phase (SETUP plus
// the cycle spent in DONE/IDLE) must be longer than one path delay.
//
// Timing: request accepted at edge 0 -> response valid (one-cycle pulse)
// after edge 2 + EVAL_CYCLES - 1. Reset is asynchronous, active low. The
// source only names time stamping with the embedded system clock; the
// handshake, the states and the stamp format are this design's own.
module puf_eval_ctrl #(
  parameter int unsigned N           = 64,
  parameter int unsigned QP          = 8,
  parameter int unsigned EVAL_CYCLES = 1,
  parameter int unsigned STAMP_W     = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // challenge request
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [N-1:0]       req_challenge,
  // PUF side
  output logic [N-1:0]       puf_challenge,
  output logic               puf_launch,
  input  logic [QP-1:0]      puf_response,
  // time-stamped response
  output logic               rsp_valid,
  output logic [QP-1:0]      rsp_response,
  output logic [STAMP_W-1:0] rsp_stamp,
  output logic [7:0]         rsp_latency
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {IDLE, SETUP, EVAL, DONE} state_e;

  state_e             state;
  logic [7:0]         eval_cnt;
  logic [STAMP_W-1:0] cycle_cnt;

  assign req_ready = (state == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_cnt <= '0;
    end else begin
      cycle_cnt <= cycle_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= IDLE;
      eval_cnt      <= '0;
      puf_challenge <= '0;
      puf_launch    <= 1'b0;
      rsp_valid     <= 1'b0;
      rsp_response  <= '0;
      rsp_stamp     <= '0;
      rsp_latency   <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        IDLE: if (req_valid) begin
          puf_challenge <= req_challenge;
          state         <= SETUP;
        end
        SETUP: begin
          puf_launch <= 1'b1;
          eval_cnt   <= 8'd1;
          state      <= EVAL;
        end
        EVAL: begin
          if (eval_cnt >= 8'(EVAL_CYCLES)) begin
            puf_launch   <= 1'b0;
            rsp_valid    <= 1'b1;
            rsp_response <= puf_response;
            rsp_stamp    <= cycle_cnt;
            rsp_latency  <= eval_cnt;
            state        <= DONE;
          end else begin
            eval_cnt <= eval_cnt + 8'd1;
          end
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // A requester must hold its challenge until it is taken.
  a_req_hold: assert property (@(posedge clk)
    req_valid && !req_ready |=> req_valid && $stable(req_challenge));
  // launch is high only while evaluating.
  a_launch: assert property (@(posedge clk)
    puf_launch |-> state == EVAL || state == DONE);
endmodule
