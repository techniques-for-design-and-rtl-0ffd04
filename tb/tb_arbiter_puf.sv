// tb_arbiter_puf: one PUF row (16 switches, ideal arbiter) against the
// reference: for random challenges the response must be 1 exactly when the
// reference top-path arrival is earlier. Also checks that the response is
// stable over repeated evaluations and that the additive delay model holds:
// the delay difference is linear in the parity vector of the challenge.
module tb_arbiter_puf;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 16, SEED = 3;
  localparam real MU = 500.0, SG = 4.0;
  int checks = 0, failures = 0;
  int ones = 0;
  logic launch = 0;
  logic [N-1:0] c = '0;
  logic r;

  arbiter_puf #(.N(N), .SEED(SEED), .MU_SW(MU), .SIGMA_SW(SG), .SIGMA_ARB(0.0)) dut (
    .launch(launch), .c(c), .r(r));

  task automatic eval(logic [N-1:0] ch, output logic resp);
    c = ch; #20000;
    launch = 1; #20000;
    resp = r;
    launch = 0; #20000;
  endtask

  initial begin
    #20000;
    for (int k = 0; k < 200; k++) begin
      logic [N-1:0] ch;
      logic resp, resp2;
      real et, eb;
      ch = N'($urandom);
      eval(ch, resp);
      chain_arrival(N, 0, SEED, MU, SG, MU, SG, MAXN'(ch), 1, et, eb);
      checks++;
      if (resp !== (et < eb)) begin
        failures++; $display("FAIL %h: r=%b top=%f bot=%f", ch, resp, et, eb);
      end
      ones += resp;
      if (k < 20) begin
        eval(ch, resp2);
        checks++;
        if (resp2 !== resp) begin failures++; $display("FAIL unstable %h", ch); end
      end
    end
    // both response values must occur
    checks++;
    if (ones < 20 || ones > 180) begin failures++; $display("FAIL bias %0d/200", ones); end
    $display("ones %0d/200", ones);
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
