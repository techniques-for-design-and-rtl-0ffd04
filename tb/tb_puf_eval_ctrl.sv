// tb_puf_eval_ctrl: drives the controller with a small PUF stand-in (a
// fixed function of the challenge that answers 5 ns after launch rises and
// forgets when it falls). Checks the handshake, that the response matches
// the stand-in, that launch is high for exactly EVAL_CYCLES cycles, the
// latency field, the time stamps, and that launch is low between requests.
module tb_puf_eval_ctrl;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 16, QP = 4, EV = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [N-1:0] req_challenge = '0;
  logic [N-1:0] puf_challenge;
  logic puf_launch;
  logic [QP-1:0] puf_response;
  logic rsp_valid;
  logic [QP-1:0] rsp_response;
  logic [31:0] rsp_stamp;
  logic [7:0] rsp_latency;
  int cyc = 0, launch_cycles = 0;
  logic [31:0] last_stamp = 0;

  always #10000 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  puf_eval_ctrl #(.N(N), .QP(QP), .EVAL_CYCLES(EV)) dut (.*);

  function automatic logic [QP-1:0] standin(logic [N-1:0] x);
    return QP'((x * 16'd40503) >> 7);
  endfunction

  logic [QP-1:0] puf_q;
  always @(posedge puf_launch) begin #5000; puf_q = standin(puf_challenge); end
  always @(negedge puf_launch) puf_q = '0;
  assign puf_response = puf_q;
  always @(posedge clk) if (puf_launch) launch_cycles++;

  initial begin
    puf_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      logic [N-1:0] x;
      int t0, lc0;
      x = N'($urandom);
      @(negedge clk);
      checks++;
      if (puf_launch !== 1'b0) begin failures++; $display("FAIL launch high while idle"); end
      req_valid = 1; req_challenge = x;
      do @(posedge clk); while (!req_ready);
      @(negedge clk); req_valid = 0; req_challenge = '0;
      t0 = cyc; lc0 = launch_cycles;
      while (!rsp_valid) @(negedge clk);
      checks++;
      if (rsp_response !== standin(x)) begin failures++; $display("FAIL response %h", x); end
      checks++;
      if (rsp_latency !== 8'(EV)) begin failures++; $display("FAIL latency %0d", rsp_latency); end
      checks++;
      if (cyc - t0 != 1 + EV) begin failures++; $display("FAIL %0d cycles to response", cyc - t0); end
      checks++;
      if (launch_cycles - lc0 != EV) begin failures++; $display("FAIL launch %0d cycles", launch_cycles - lc0); end
      checks++;
      if (k > 0 && rsp_stamp <= last_stamp) begin failures++; $display("FAIL stamp not increasing"); end
      last_stamp = rsp_stamp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
