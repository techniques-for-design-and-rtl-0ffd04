// tb_secure_puf: the secure PUF at reduced size (16 switches, (Q, QP, X, S)
// = (5, 4, 4, 1), ideal arbiters) against a reference built from the
// equations: interconnect rotation, XOR input network, per-row delay walk,
// output parity. Also checks that no response appears before the shortest
// possible path delay, and measures how often a single flipped challenge
// bit flips each output bit (ideally one half).
module tb_secure_puf;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 16, Q = 5, QP = 4, X = 4, S = 1, SEED = 40;
  localparam real MU = 500.0, SG = 4.0;
  int checks = 0, failures = 0;
  int flips = 0, trials = 0;
  logic launch = 0;
  logic [N-1:0] chal = '0;
  logic [Q-1:0] r;
  logic [QP-1:0] o;

  secure_puf #(.N(N), .Q(Q), .QP(QP), .X(X), .S(S), .KIND(NET_XOR), .SEED(SEED),
               .MU_SW(MU), .SIGMA_SW(SG), .SIGMA_ARB(0.0)) dut (
    .launch(launch), .challenge(chal), .r(r), .o(o));

  function automatic logic [Q-1:0] ref_r(logic [N-1:0] x);
    logic [Q-1:0] rr;
    for (int m = 0; m < int'(Q); m++) begin
      logic [MAXN-1:0] cm;
      real et, eb;
      cm = g_xor(N, rotate_row(N, m, MAXN'(x)));
      chain_arrival(N, 0, SEED + m, MU, SG, MU, SG, cm, 1, et, eb);
      rr[m] = (et < eb);
    end
    return rr;
  endfunction

  task automatic eval(logic [N-1:0] x, output logic [QP-1:0] out);
    logic [Q-1:0] prev_r;
    chal = x; #20000;
    prev_r = r;
    launch = 1;
    #(N * (MU - 6.0 * SG) - 100.0);    // shortest path not reached yet
    checks++;
    if (r !== prev_r) begin failures++; $display("FAIL response changed too early"); end
    #20000;
    checks++;
    if (r !== ref_r(x)) begin failures++; $display("FAIL r %h: %b vs %b", x, r, ref_r(x)); end
    checks++;
    if (o !== QP'(z_out(Q, QP, X, S, MAXN'(r)))) begin failures++; $display("FAIL o %h", x); end
    out = o;
    launch = 0; #20000;
  endtask

  initial begin
    #20000;
    for (int k = 0; k < 60; k++) begin
      logic [N-1:0] x;
      logic [QP-1:0] o1, o2;
      int b;
      x = N'($urandom);
      eval(x, o1);
      b = $urandom_range(N - 1);
      x[b] = ~x[b];
      eval(x, o2);
      flips += $countones(o1 ^ o2);
      trials += QP;
    end
    $display("output bit flip rate %0d/%0d", flips, trials);
    checks++;
    if (flips < trials / 5 || flips > trials * 4 / 5) begin
      failures++; $display("FAIL flip rate far from one half");
    end
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
