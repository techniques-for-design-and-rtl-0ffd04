// tb_pll_model: with a 13 MHz, then 14 MHz, then 15 MHz reference the
// output period must be one seventh of the reference period (91, 98,
// 105 MHz), and locked must rise after the second reference edge.
module tb_pll_model;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic ref_clk = 0;
  logic clk_out, locked;
  real ref_half;
  realtime t_last, period;

  pll_model #(.M(7)) dut (.ref_clk(ref_clk), .clk_out(clk_out), .locked(locked));

  initial begin
    ref_half = 1.0e6 / 13.0 / 2.0;   // ps
    forever begin #(ref_half); ref_clk = ~ref_clk; end
  end

  always @(posedge clk_out) begin
    period = $realtime - t_last;
    t_last = $realtime;
  end

  task automatic measure(real f_mhz);
    ref_half = 1.0e6 / f_mhz / 2.0;
    #3000000;
    checks++;
    if (period < 1.0e6 / (7.0 * f_mhz) - 1.0 || period > 1.0e6 / (7.0 * f_mhz) + 1.0) begin
      failures++; $display("FAIL %f MHz: period %f", f_mhz, period);
    end
    $display("ref %f MHz -> out %f MHz", f_mhz, 1.0e6 / period);
  endtask

  initial begin
    t_last = 0.0; period = 0.0;
    checks++;
    if (locked !== 1'b0) begin failures++; $display("FAIL locked at start"); end
    #200000;
    checks++;
    if (locked !== 1'b1) begin failures++; $display("FAIL not locked"); end
    measure(13.0);
    measure(14.0);
    measure(15.0);
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
