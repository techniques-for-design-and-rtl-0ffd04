// tb_arbiter: checks the arbiter model. Ideal (SIGMA = 0): q = 1 when d rises
// before g, 0 when after. Gaussian (SIGMA = 15 ps): far-apart edges decide
// deterministically; equal arrival gives about 50 % ones; d rising one
// SIGMA before g gives about 84 %, one SIGMA after about 16 %.
module tb_arbiter;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic d0 = 0, g0 = 0, d1 = 0, g1 = 0;
  logic q0, q1;

  arbiter #(.SIGMA(0.0))  u_ideal (.d(d0), .g(g0), .q(q0));
  arbiter #(.SIGMA(15.0)) u_gauss (.d(d1), .g(g1), .q(q1));

  // d rises at dt_d, g at dt_g (ps after now); both fall afterwards.
  task automatic race0(real dt_d, real dt_g, bit exp_q);
    fork
      begin #(dt_d); d0 = 1; end
      begin #(dt_g); g0 = 1; end
    join
    #1000;
    checks++;
    if (q0 !== exp_q) begin failures++; $display("FAIL ideal %f %f q=%b", dt_d, dt_g, q0); end
    d0 = 0; g0 = 0; #1000;
  endtask

  task automatic race1(real dt_d, real dt_g, output bit q);
    fork
      begin #(dt_d); d1 = 1; end
      begin #(dt_g); g1 = 1; end
    join
    #1000;
    q = q1;
    d1 = 0; g1 = 0; #1000;
  endtask

  task automatic rate(real dt_d, real dt_g, real lo, real hi);
    int ones;
    bit q;
    ones = 0;
    for (int k = 0; k < 400; k++) begin
      race1(dt_d, dt_g, q);
      ones += q;
    end
    checks++;
    if (ones < lo * 400 || ones > hi * 400) begin
      failures++; $display("FAIL rate d=%f g=%f ones=%0d/400", dt_d, dt_g, ones);
    end
    $display("d at %f, g at %f: %0d/400 ones", dt_d, dt_g, ones);
  endtask

  initial begin
    #1000;
    race0(10.0, 20.0, 1);
    race0(20.0, 10.0, 0);
    race0(100.0, 101.0, 1);
    race0(101.0, 100.0, 0);
    rate(100.0, 300.0, 0.99, 1.0);   // d 200 ps early
    rate(300.0, 100.0, 0.0, 0.01);   // d 200 ps late
    rate(100.0, 100.0, 0.38, 0.62);  // simultaneous
    rate(100.0, 115.0, 0.74, 0.94);  // d one sigma early
    rate(115.0, 100.0, 0.06, 0.26);  // d one sigma late
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
