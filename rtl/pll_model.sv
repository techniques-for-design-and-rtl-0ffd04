// pll_model: behavioural model of the FPGA's on-chip PLL in the
// characterization circuit (not synthesizable: a real design instantiates
// the vendor's PLL primitive).
//
// The output runs at M times the reference frequency. The model measures
// the period of each reference cycle and produces the next output cycles at
// 1/M of it, so it follows a slowly swept reference (13-15 MHz swept, times
// 7, gives 91-105 MHz). `locked` rises once two reference edges have been
// seen. Phase alignment and loop dynamics are not modelled.
// The half-period delays are computed at run time, so lint cannot prove
// them non-zero; they are zero only before lock, when the loop does not run.
module pll_model #(
  parameter int unsigned M = 7
) (
  input  logic ref_clk,
  output logic clk_out,
  output logic locked
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime t_last;
  realtime half;

  initial begin
    t_last  = -1.0;
    half    = 0.0;
    locked  = 1'b0;
    clk_out = 1'b0;
  end

  always begin
    @(posedge ref_clk);
    if (t_last >= 0.0) begin
      half   = ($realtime - t_last) / (2.0 * M);
      locked = 1'b1;
    end
    t_last = $realtime;
  end

  initial begin
    forever begin
      if (!locked) begin
        @(posedge ref_clk);
      end else begin
        clk_out = 1'b1;
        #(half);
        clk_out = 1'b0;
        #(half);
      end
    end
  end
endmodule
