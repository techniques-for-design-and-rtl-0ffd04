// arbiter: behavioural model of an edge-triggered latch used as a PUF arbiter
// and, in the characterization circuit, as a sample flip flop.
//
// On a rising edge of g the model takes the value of d. If d changed close to
// that edge, the outcome is random: with dt the time from the last change of
// d to the edge of g, the new value of d is taken with probability
// Phi(dt / SIGMA) and the old one otherwise, Phi being the Gaussian CDF. This
// is the Gaussian arbiter characteristic fitted to the measured flip flops;
// SIGMA is the flip flop's "speed" (8 to 22 ps were measured on the FPGAs).
// As a PUF arbiter, d is the top path and g the bottom path: q = 1 when the
// top edge arrives first. SIGMA = 0 gives an ideal arbiter that follows d at
// the edge of g. A change of d up to 5*SIGMA after the edge is still seen,
// so q settles 5*SIGMA after the edge of g (the model's clock-to-q delay).
// Rise and fall use the same SIGMA here, a simplification.
module arbiter
  import puf_pkg::*;
#(
  parameter real SIGMA = 15.0   // ps
) (
  input  logic d,
  input  logic g,
  output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  logic    d_now;    // value of d after its last change
  logic    d_prev;   // value of d before its last change
  realtime t_chg;    // time of the last change of d

  initial begin
    d_now  = 1'b0;
    d_prev = 1'b0;
    t_chg  = -1.0e9;
  end

  always @(d) begin
    d_prev = d_now;
    d_now  = d;
    t_chg  = $realtime;
  end

  initial q = 1'b0;

  always @(posedge g) begin
    realtime t_g;
    real     p_new, u;
    if (SIGMA <= 0.0) begin
      q <= d;
    end else begin
      t_g = $realtime;
      #(5.0 * SIGMA);
      p_new = normal_cdf((t_g - t_chg) / SIGMA);
      u     = real'($urandom) / 4294967296.0;
      q <= (u < p_new) ? d_now : d_prev;
    end
  end
endmodule
