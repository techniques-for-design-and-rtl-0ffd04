// tb_delay_element: checks that a 6-inverter delay element does not invert
// and that rising and falling edges take the sum of the alternating
// inverter fall/rise delays drawn for this instance.
module tb_delay_element;
  import puf_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NINV = 6, SEED = 5, STAGE = 3, PATH = 1;
  localparam real MU = 186.0, SIGMA = 9.1;
  int checks = 0, failures = 0;
  logic a = 0, y;
  realtime ty, ta;

  delay_element #(.NINV(NINV), .MU(MU), .SIGMA(SIGMA), .SEED(SEED), .STAGE(STAGE),
                  .PATH(PATH)) dut (.a(a), .y(y));

  always @(posedge y or negedge y) ty = $realtime;

  function automatic real expected(bit rising);
    real t;
    bit  r;
    t = 0.0;
    r = rising;
    for (int unsigned j = 0; j < NINV; j++) begin
      t += inverter_delay(MU, SIGMA, SEED, STAGE, PATH, j, r ? 1 : 0);
      r = !r;
    end
    return t;
  endfunction

  task automatic edge_test(bit v);
    real exp_t;
    ta = $realtime; a = v; #5000;
    exp_t = expected(v);
    checks++;
    if (y !== v) begin failures++; $display("FAIL level %b", y); end
    checks++;
    if (ty - ta < exp_t - 0.01 || ty - ta > exp_t + 0.01) begin
      failures++; $display("FAIL delay %f expected %f", ty - ta, exp_t);
    end
    // the sum of six delays must be near 6 * MU
    checks++;
    if (exp_t < 6.0 * MU - 6.0 * 4.0 * SIGMA || exp_t > 6.0 * MU + 6.0 * 4.0 * SIGMA) begin
      failures++; $display("FAIL delay out of range %f", exp_t);
    end
  endtask

  initial begin
    #5000;
    checks++;
    if (y !== 1'b0) begin failures++; $display("FAIL rest level"); end
    repeat (3) begin edge_test(1); edge_test(0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
