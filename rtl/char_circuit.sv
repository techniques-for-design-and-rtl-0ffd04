// char_circuit: built-in delay characterization circuit for a PUF under
// test, as measured on the FPGA.
//
// The idea: instead of guessing switch delays from PUF responses, measure
// them. A launch T flip flop toggles every system-clock cycle and sends
// alternately rising and falling edges into both paths of the PUF under
// test. Each path end is sampled one clock period later by its own sample
// flip flop (top path -> error counter 1, bottom path -> error counter 2).
// While the clock period is longer than the path delay the sample equals
// the launched value; as the period shrinks past the path delay the sample
// becomes wrong, first with the sample flip flop's Gaussian uncertainty and
// then always. Sweeping the clock frequency and reading the error counts
// per frequency gives the path delay (where the error rate crosses 0.25 for
// the rising and 0.75 for the falling edge) and the flip flop's own
// characteristic. Repeating this for the challenges 0, 1, 3, ..., 127 gives
// a linear system for the per-switch delay differences.
//
// Parts: PLL (x7) from the swept external clock, launch T flip flop, PUF
// under test (8 switches, 6 inverters after each), two sample flip flops
// (arbiter models), two error_capture stages with 8-bit counters, a 9-bit
// window counter (READ and clear every 512 cycles) and the challenge
// generator stepped by SYNCH. Outputs c1/c2 are valid while read is high.
// Defaults follow the measured circuit; SIGMA_FF = 15 ps lies inside the
// 8-22 ps range measured for the sample flip flops. Reset is asynchronous,
// active low, and must be held until the PLL has locked.
// The window counter's count value (win_cnt) is not used here: only its
// READ decode leaves the block, as in the measured circuit.
module char_circuit #(
  parameter int unsigned N         = 8,
  parameter int unsigned NINV      = 6,
  parameter int unsigned SEED      = 7,
  parameter real         MU_SW     = 186.0,
  parameter real         SIGMA_SW  = 9.1,
  parameter real         MU_INV    = 186.0,
  parameter real         SIGMA_INV = 9.1,
  parameter real         SIGMA_FF  = 15.0,
  parameter int unsigned PLL_M     = 7,
  parameter int unsigned WIN_W     = 9,
  parameter int unsigned CNT_W     = 8
) (
  input  logic             ext_clk,    // swept external clock (13-15 MHz)
  input  logic             rst_n,
  input  logic             synch,      // start of a new sweep
  output logic             sys_clk,    // PLL output
  output logic             pll_locked,
  output logic [N-1:0]     challenge,
  output logic             read,
  output logic [CNT_W-1:0] c1,         // top path error count / 2
  output logic [CNT_W-1:0] c2,         // bottom path error count / 2
  output logic             err1,       // capture flip flop, top path
  output logic             err2,       // capture flip flop, bottom path
  output logic             chal_adv    // challenge advanced this cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  logic clk;
  logic launch;
  logic top_out, bot_out;
  logic samp_top, samp_bot;
  logic [WIN_W-1:0] win_cnt;   // window position; only READ leaves the block

  pll_model #(.M(PLL_M)) u_pll (.ref_clk(ext_clk), .clk_out(clk), .locked(pll_locked));
  assign sys_clk = clk;

  // Launch T flip flop, T input tied high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) launch <= 1'b0;
    else        launch <= ~launch;
  end

  puf_delay_chain #(
    .N(N), .NINV(NINV), .SEED(SEED), .MU_SW(MU_SW), .SIGMA_SW(SIGMA_SW),
    .MU_INV(MU_INV), .SIGMA_INV(SIGMA_INV)
  ) u_put (
    .launch(launch), .c(challenge), .top_out(top_out), .bot_out(bot_out)
  );

  arbiter #(.SIGMA(SIGMA_FF)) u_sample_top (.d(top_out), .g(clk), .q(samp_top));
  arbiter #(.SIGMA(SIGMA_FF)) u_sample_bot (.d(bot_out), .g(clk), .q(samp_bot));

  error_capture #(.CNT_W(CNT_W)) u_cap_top (
    .clk(clk), .rst_n(rst_n), .launch(launch), .sample(samp_top), .clear(read),
    .err(err1), .count(c1)
  );
  error_capture #(.CNT_W(CNT_W)) u_cap_bot (
    .clk(clk), .rst_n(rst_n), .launch(launch), .sample(samp_bot), .clear(read),
    .err(err2), .count(c2)
  );

  window_counter #(.W(WIN_W)) u_win (.clk(clk), .rst_n(rst_n), .read(read), .count(win_cnt));

  challenge_gen #(.W(N)) u_chal (
    .clk(clk), .rst_n(rst_n), .synch(synch), .challenge(challenge), .advanced(chal_adv)
  );
endmodule
