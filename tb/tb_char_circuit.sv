// tb_char_circuit: the characterization circuit at its defaults (8
// switches, 6 inverters after each, 9-bit window, 8-bit counters, PLL x7).
// The testbench plays the external clock generator: for two challenges it
// sweeps the reference from 13 to 15 MHz in small steps (system clock 91 to
// 105 MHz) and reads both error counters at READ, as the logic analyzer
// would. Checks:
//  * READ comes every 512 system-clock cycles;
//  * far from the path delays the counts are 0 (slow clock) or 255 (fast);
//  * elsewhere the count matches the fraction of launch edges (rising,
//    falling) whose reference path delay exceeds the clock period;
//  * the clock period at which the error rate crosses 0.25 (0.75) recovers
//    the slower (faster) of the rising and falling path delays;
//  * SYNCH advances the challenge from 0 to 1.
module tb_char_circuit;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 8, NINV = 6, SEED = 7;
  localparam real MU = 186.0, SG = 9.1, SIGMA_FF = 15.0;

  int checks = 0, failures = 0;
  int reads = 0, zero_windows = 0, full_windows = 0, partial_windows = 0;
  logic ext_clk = 0, rst_n = 0, synch = 0;
  logic sys_clk, pll_locked, read, err1, err2, chal_adv;
  logic [N-1:0] challenge;
  logic [7:0] c1, c2;
  real ext_half;
  int sys_cycles = 0, last_read_cycle = -1;

  char_circuit dut (.ext_clk(ext_clk), .rst_n(rst_n), .synch(synch), .sys_clk(sys_clk),
                    .pll_locked(pll_locked), .challenge(challenge), .read(read),
                    .c1(c1), .c2(c2), .err1(err1), .err2(err2), .chal_adv(chal_adv));

  initial begin
    ext_half = 1.0e6 / 14.0 / 2.0;
    forever begin #(ext_half); ext_clk = ~ext_clk; end
  end

  always @(posedge sys_clk) begin
    sys_cycles++;
    if (read && rst_n) begin
      if (last_read_cycle >= 0) begin
        checks++;
        if (sys_cycles - last_read_cycle != 512) begin
          failures++; $display("FAIL READ spacing %0d", sys_cycles - last_read_cycle);
        end
      end
      last_read_cycle = sys_cycles;
      reads++;
    end
  end

  // Expected error rate of one path at clock period t.
  function automatic real exp_rate(real t, real d_rise, real d_fall, output bit sure);
    real margin;
    margin = 5.0 * SIGMA_FF + 20.0;
    sure = ((d_rise > t + margin) || (d_rise < t - margin)) &&
           ((d_fall > t + margin) || (d_fall < t - margin));
    return 0.5 * real'(d_rise > t) + 0.5 * real'(d_fall > t);
  endfunction

  // Set the system clock period (ps), wait for two windows, return counts.
  task automatic measure(real t_sys, output int n1, output int n2);
    ext_half = t_sys * 7.0 / 2.0;
    repeat (3) @(posedge ext_clk);
    last_read_cycle = -1;
    @(posedge sys_clk iff read);
    @(posedge sys_clk iff read);
    n1 = c1; n2 = c2;
  endtask

  task automatic sweep();
    real tr_top, tr_bot, tf_top, tf_bot;
    real t25_1, t75_1, t25_2, t75_2;
    chain_arrival(N, NINV, SEED, MU, SG, MU, SG, MAXN'(challenge), 1, tr_top, tr_bot);
    chain_arrival(N, NINV, SEED, MU, SG, MU, SG, MAXN'(challenge), 0, tf_top, tf_bot);
    $display("challenge %0d: top rise %f fall %f, bottom rise %f fall %f",
             challenge, tr_top, tf_top, tr_bot, tf_bot);
    t25_1 = 0; t75_1 = 0; t25_2 = 0; t75_2 = 0;
    for (real t = 11200.0; t >= 9600.0; t -= 25.0) begin
      int n1, n2;
      real r1, r2, e1, e2;
      bit s1, s2;
      measure(t, n1, n2);
      r1 = real'(n1) * 2.0 / 511.0;
      r2 = real'(n2) * 2.0 / 511.0;
      e1 = exp_rate(t, tr_top, tf_top, s1);
      e2 = exp_rate(t, tr_bot, tf_bot, s2);
      if (s1) begin
        checks++;
        if (r1 < e1 - 0.02 || r1 > e1 + 0.02) begin
          failures++; $display("FAIL top T=%f count %0d expected rate %f", t, n1, e1);
        end
      end
      if (s2) begin
        checks++;
        if (r2 < e2 - 0.02 || r2 > e2 + 0.02) begin
          failures++; $display("FAIL bottom T=%f count %0d expected rate %f", t, n2, e2);
        end
      end
      if (n1 == 0 && n2 == 0) zero_windows++;
      else if (n1 == 255 && n2 == 255) full_windows++;
      else partial_windows++;
      if (t25_1 == 0 && r1 >= 0.25) t25_1 = t;
      if (t75_1 == 0 && r1 >= 0.75) t75_1 = t;
      if (t25_2 == 0 && r2 >= 0.25) t25_2 = t;
      if (t75_2 == 0 && r2 >= 0.75) t75_2 = t;
    end
    $display("top: 0.25 at %f (slower edge %f), 0.75 at %f (faster edge %f)",
             t25_1, (tr_top > tf_top) ? tr_top : tf_top, t75_1, (tr_top > tf_top) ? tf_top : tr_top);
    $display("bottom: 0.25 at %f (slower edge %f), 0.75 at %f (faster edge %f)",
             t25_2, (tr_bot > tf_bot) ? tr_bot : tf_bot, t75_2, (tr_bot > tf_bot) ? tf_bot : tr_bot);
    checks++;
    if (t25_1 < ((tr_top > tf_top) ? tr_top : tf_top) - 60.0 ||
        t25_1 > ((tr_top > tf_top) ? tr_top : tf_top) + 30.0) begin
      failures++; $display("FAIL top slower-edge estimate");
    end
    checks++;
    if (t75_1 < ((tr_top > tf_top) ? tf_top : tr_top) - 60.0 ||
        t75_1 > ((tr_top > tf_top) ? tf_top : tr_top) + 30.0) begin
      failures++; $display("FAIL top faster-edge estimate");
    end
    checks++;
    if (t25_2 < ((tr_bot > tf_bot) ? tr_bot : tf_bot) - 60.0 ||
        t25_2 > ((tr_bot > tf_bot) ? tr_bot : tf_bot) + 30.0) begin
      failures++; $display("FAIL bottom slower-edge estimate");
    end
    checks++;
    if (t75_2 < ((tr_bot > tf_bot) ? tf_bot : tr_bot) - 60.0 ||
        t75_2 > ((tr_bot > tf_bot) ? tf_bot : tr_bot) + 30.0) begin
      failures++; $display("FAIL bottom faster-edge estimate");
    end
  endtask

  initial begin
    #2000000;              // PLL locks
    rst_n = 1;
    checks++;
    if (!pll_locked || challenge !== '0) begin failures++; $display("FAIL start state"); end
    sweep();
    synch = 1; #300000; synch = 0; #300000;
    checks++;
    if (challenge !== N'(1)) begin failures++; $display("FAIL challenge after SYNCH: %0d", challenge); end
    sweep();
    checks++;
    if (zero_windows == 0 || full_windows == 0 || partial_windows == 0) begin
      failures++; $display("FAIL a region was never reached");
    end
    $display("windows: %0d error-free, %0d all-error, %0d partial; %0d READs",
             zero_windows, full_windows, partial_windows, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
