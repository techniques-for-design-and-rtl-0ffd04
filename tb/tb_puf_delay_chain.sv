// tb_puf_delay_chain: launches rising and falling edges into an 8-switch
// chain with 6-inverter delay elements for many challenges and compares the
// arrival times at both path ends with a switch-by-switch reference walk.
// Also checks that the mean path delay is close to the measured 10.41 ns.
module tb_puf_delay_chain;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 8, NINV = 6, SEED = 11;
  localparam real MU = 186.0, SG = 9.1;
  int checks = 0, failures = 0;
  logic launch = 0;
  logic [N-1:0] c = '0;
  logic top_out, bot_out;
  realtime tt, tbt, tl;
  real sum_delay;
  int  n_delay;

  puf_delay_chain #(.N(N), .NINV(NINV), .SEED(SEED), .MU_SW(MU), .SIGMA_SW(SG),
                    .MU_INV(MU), .SIGMA_INV(SG)) dut (
    .launch(launch), .c(c), .top_out(top_out), .bot_out(bot_out));

  always @(posedge top_out or negedge top_out) tt = $realtime;
  always @(posedge bot_out or negedge bot_out) tbt = $realtime;

  task automatic run(logic [N-1:0] ch, bit v);
    real et, eb;
    c = ch; #1000;
    tl = $realtime; launch = v; #30000;
    chain_arrival(N, NINV, SEED, MU, SG, MU, SG, MAXN'(ch), v, et, eb);
    checks++;
    if (top_out !== v || bot_out !== v) begin failures++; $display("FAIL level"); end
    checks++;
    if ((tt - tl) < et - 0.01 || (tt - tl) > et + 0.01) begin
      failures++; $display("FAIL top %h: %f vs %f", ch, tt - tl, et);
    end
    checks++;
    if ((tbt - tl) < eb - 0.01 || (tbt - tl) > eb + 0.01) begin
      failures++; $display("FAIL bot %h: %f vs %f", ch, tbt - tl, eb);
    end
    sum_delay += et + eb;
    n_delay += 2;
  endtask

  initial begin
    sum_delay = 0.0; n_delay = 0;
    #30000;   // let the paths settle after power-up
    for (int k = 0; k < 8; k++) begin   // 0, 1, 3, ..., 127 as in the measurements
      run(N'((1 << k) - 1), 1);
      run(N'((1 << k) - 1), 0);
    end
    repeat (20) begin
      logic [N-1:0] r;
      r = N'($urandom);
      run(r, 1);
      run(r, 0);
    end
    checks++;
    if (sum_delay / n_delay < 10000.0 || sum_delay / n_delay > 10800.0) begin
      failures++; $display("FAIL mean path delay %f", sum_delay / n_delay);
    end
    $display("mean path delay %f ps", sum_delay / n_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
