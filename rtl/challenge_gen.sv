// challenge_gen: challenge source of the characterization circuit.
//
// During one sweep of the clock frequency the challenge is held; at each
// SYNCH pulse from the external clock generator (start of a new sweep) it
// advances through 0, 1, 3, 7, ..., 2^(W-1)-1 and wraps to 0, i.e. the
// eight values 0, 1, 3, 7, 15, 31, 63, 127 for W = 8. Each value flips one
// more switch, so the measured path delays give a solvable set of linear
// equations for the per-switch delay differences.
// SYNCH comes from another clock domain: it is synchronized with two flip
// flops and its rising edge detected (this design's choice). Reset is
// asynchronous, active low.
module challenge_gen #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         synch,
  output logic [W-1:0] challenge,
  output logic         advanced    // one-cycle pulse when the challenge changed
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] LAST = {1'b0, {(W-1){1'b1}}};

  logic [2:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= '0;
      challenge <= '0;
      advanced  <= 1'b0;
    end else begin
      sync_q   <= {sync_q[1:0], synch};
      advanced <= 1'b0;
      if (sync_q[1] && !sync_q[2]) begin
        challenge <= (challenge == LAST) ? '0 : {challenge[W-2:0], 1'b1};
        advanced  <= 1'b1;
      end
    end
  end
endmodule
