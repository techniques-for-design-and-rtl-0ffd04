// tb_puf_switch: checks the straight and crossed routing of the switch model
// and that each of its four links adds its own delay, for rising and falling
// edges.
module tb_puf_switch;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real D00 = 510.25, D01 = 497.5, D10 = 503.125, D11 = 492.0;
  int checks = 0, failures = 0;
  logic in0 = 0, in1 = 0, sel = 0;
  logic out0, out1;
  realtime t0, t1, tl;

  puf_switch #(.D00(D00), .D01(D01), .D10(D10), .D11(D11)) dut (
    .in0(in0), .in1(in1), .sel(sel), .out0(out0), .out1(out1));

  always @(posedge out0 or negedge out0) t0 = $realtime;
  always @(posedge out1 or negedge out1) t1 = $realtime;

  task automatic check_close(real got, real exp, string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  // Launch an edge on in0 only, then on in1 only, and time both outputs.
  task automatic one_edge(bit s, bit v);
    sel = s; #2000;
    tl = $realtime; in0 = v; #2000;
    if (!s) begin
      check_close(t0 - tl, D00, "in0->out0");
      checks++; if (out0 !== v || out1 !== !v) begin failures++; $display("FAIL straight level"); end
    end else begin
      check_close(t1 - tl, D01, "in0->out1");
      checks++; if (out1 !== v || out0 !== !v) begin failures++; $display("FAIL cross level"); end
    end
    tl = $realtime; in1 = v; #2000;
    if (!s) check_close(t1 - tl, D11, "in1->out1");
    else    check_close(t0 - tl, D10, "in1->out0");
    checks++; if (out0 !== v || out1 !== v) begin failures++; $display("FAIL both level"); end
  endtask

  initial begin
    #1000;
    one_edge(0, 1); one_edge(0, 0);
    one_edge(1, 1); one_edge(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
