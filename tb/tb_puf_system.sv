// tb_puf_system: end-to-end test of the whole design with every parameter at
// its default (64-switch rows, 9 rows, 8 output bits, 8-switch PUF under
// test with 6 inverters per stage).
//
// Secure PUF side (25 MHz clock): random challenges go through the
// evaluation controller. Each raw row response is compared with the
// reference delay walk (interconnect rotation, XOR input network, per-row
// delays); where the reference delay difference is within 6 ps the 1 ps
// arbiter may decide either way, and those cases are counted as
// metastable-zone decisions instead. The output must be the parity network
// of the row responses and, when no row is in its metastable zone, equal
// the fully predicted output. Pairs of challenges that differ in one bit
// measure the avalanche rate. Latency and time stamps are checked.
//
// Characterization side: a short frequency sweep around the path delay of
// the PUF under test, then SYNCH, then a second short sweep; counts at
// READ must follow the reference path delays.
//
// Each mechanism must have occurred at least once: metastable-zone
// decision, fully predicted response, output flip after a one-bit challenge
// flip, error-free window, all-error window, partial window, READ, challenge
// advance.
module tb_puf_system;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  // design defaults restated for the reference
  localparam int unsigned N = 64, Q = 9, QP = 8, X = 8, S = 1, SEED = 100;
  localparam real MU = 500.0, SG = 4.0;
  localparam int unsigned CN = 8, CNINV = 6, CSEED = 7;
  localparam real CMU = 186.0, CSG = 9.1, SIGMA_FF = 15.0;

  int checks = 0, failures = 0;
  int n_meta = 0, n_predicted = 0, n_flip = 0, n_flip_trials = 0;
  int zero_windows = 0, full_windows = 0, partial_windows = 0, reads = 0, advances = 0;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  logic [N-1:0] req_challenge = '0;
  logic rsp_valid;
  logic [QP-1:0] rsp_response;
  logic [31:0] rsp_stamp;
  logic [7:0] rsp_latency;
  logic [Q-1:0] row_responses;
  logic char_ext_clk = 0, char_rst_n = 0, char_synch = 0;
  logic char_sys_clk, char_pll_locked, char_read, char_err1, char_err2, char_chal_adv;
  logic [CN-1:0] char_challenge;
  logic [7:0] char_c1, char_c2;
  real ext_half;

  puf_system dut (.*);

  always #20000 clk = ~clk;                 // 40 ns > 32 ns path delay
  initial begin
    ext_half = 1.0e6 / 14.0 / 2.0;
    forever begin #(ext_half); char_ext_clk = ~char_ext_clk; end
  end
  always @(posedge char_sys_clk) begin
    if (char_read && char_rst_n) reads++;
    if (char_chal_adv) advances++;
  end

  // ---------------------------------------------------------------- PUF side
  task automatic evaluate(logic [N-1:0] x, output logic [QP-1:0] o);
    logic [Q-1:0] exp_r;
    bit sure;
    @(negedge clk);
    req_valid = 1; req_challenge = x;
    do @(posedge clk); while (!req_ready);
    @(negedge clk); req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    sure = 1;
    for (int m = 0; m < int'(Q); m++) begin
      real et, eb;
      chain_arrival(N, 0, SEED + m, MU, SG, MU, SG,
                    g_xor(N, rotate_row(N, m, MAXN'(x))), 1, et, eb);
      exp_r[m] = (et < eb);
      if (eb - et < 6.0 && et - eb < 6.0) begin
        sure = 0;
        n_meta++;
      end else begin
        checks++;
        if (row_responses[m] !== exp_r[m]) begin
          failures++; $display("FAIL row %0d for %h: delta %f", m, x, eb - et);
        end
      end
    end
    checks++;
    if (rsp_response !== QP'(z_out(Q, QP, X, S, MAXN'(row_responses)))) begin
      failures++; $display("FAIL output network for %h", x);
    end
    if (sure) begin
      n_predicted++;
      checks++;
      if (rsp_response !== QP'(z_out(Q, QP, X, S, MAXN'(exp_r)))) begin
        failures++; $display("FAIL predicted output for %h", x);
      end
    end
    checks++;
    if (rsp_latency !== 8'd1) begin failures++; $display("FAIL latency %0d", rsp_latency); end
    o = rsp_response;
  endtask

  task automatic puf_side();
    logic [31:0] last_stamp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    last_stamp = 0;
    for (int k = 0; k < 100; k++) begin
      logic [N-1:0] x;
      logic [QP-1:0] o1, o2;
      int b;
      x = {$urandom, $urandom};
      evaluate(x, o1);
      checks++;
      if (k > 0 && rsp_stamp <= last_stamp) begin failures++; $display("FAIL stamp"); end
      last_stamp = rsp_stamp;
      b = $urandom_range(N - 1);
      x[b] = ~x[b];
      evaluate(x, o2);
      n_flip += $countones(o1 ^ o2);
      n_flip_trials += QP;
    end
  endtask

  // ---------------------------------------------- characterization side
  task automatic measure(real t_sys, output int n1, output int n2);
    ext_half = t_sys * 7.0 / 2.0;
    repeat (3) @(posedge char_ext_clk);
    @(posedge char_sys_clk iff char_read);
    @(posedge char_sys_clk iff char_read);
    n1 = char_c1; n2 = char_c2;
  endtask

  task automatic short_sweep();
    real tr_t, tr_b, tf_t, tf_b, lo, hi;
    chain_arrival(CN, CNINV, CSEED, CMU, CSG, CMU, CSG, MAXN'(char_challenge), 1, tr_t, tr_b);
    chain_arrival(CN, CNINV, CSEED, CMU, CSG, CMU, CSG, MAXN'(char_challenge), 0, tf_t, tf_b);
    lo = tr_t; hi = tr_t;
    if (tf_t < lo) lo = tf_t; if (tr_b < lo) lo = tr_b; if (tf_b < lo) lo = tf_b;
    if (tf_t > hi) hi = tf_t; if (tr_b > hi) hi = tr_b; if (tf_b > hi) hi = tf_b;
    for (real t = hi + 300.0; t >= lo - 300.0; t -= 50.0) begin
      int n1, n2;
      measure(t, n1, n2);
      if (t > hi + 100.0) begin
        checks++;
        if (n1 != 0 || n2 != 0) begin failures++; $display("FAIL errors at slow clock %f", t); end
      end
      if (t < lo - 100.0) begin
        checks++;
        if (n1 != 255 || n2 != 255) begin failures++; $display("FAIL counts at fast clock %f", t); end
      end
      if (n1 == 0 && n2 == 0) zero_windows++;
      else if (n1 == 255 && n2 == 255) full_windows++;
      else partial_windows++;
    end
  endtask

  task automatic char_side();
    #2000000;
    char_rst_n = 1;
    short_sweep();
    char_synch = 1; #300000; char_synch = 0; #300000;
    checks++;
    if (char_challenge !== CN'(1)) begin failures++; $display("FAIL char challenge"); end
    short_sweep();
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
    $display("%-34s %0d", what, n);
  endtask

  initial begin
    fork
      puf_side();
      char_side();
    join
    need(n_meta, "metastable-zone arbiter decisions");
    need(n_predicted, "fully predicted responses");
    need(n_flip, "output flips after one-bit flips");
    need(zero_windows, "error-free windows");
    need(full_windows, "all-error windows");
    need(partial_windows, "partial-error windows");
    need(reads, "READ pulses");
    need(advances, "challenge advances");
    $display("avalanche: %0d of %0d output bits flipped", n_flip, n_flip_trials);
    checks++;
    if (n_flip < n_flip_trials * 3 / 10 || n_flip > n_flip_trials * 7 / 10) begin
      failures++; $display("FAIL avalanche rate far from one half");
    end
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
