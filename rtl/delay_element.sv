// delay_element: behavioural model of a delay element made of a series of
// inverters, one per LUT, as inserted between the switches of the PUF under
// test (six per element in the measured FPGA circuit).
//
// Each inverter has its own rise and fall delay, drawn per instance from a
// Gaussian with mean MU and deviation SIGMA (picoseconds) with the seed,
// stage and path given as parameters. With an even NINV the element does not
// invert; with NINV = 0 it is a plain wire. Edges are delayed with transport
// semantics (every edge is kept), which is what the widely spaced launch
// edges of a PUF need.
module delay_element
  import puf_pkg::*;
#(
  parameter int unsigned NINV  = 6,
  parameter real         MU    = 186.0,
  parameter real         SIGMA = 9.1,
  parameter int unsigned SEED  = 1,
  parameter int unsigned STAGE = 0,
  parameter int unsigned PATH  = 0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NINV:0] n;
  assign n[0] = a;

  for (genvar k = 0; k < NINV; k++) begin : g_inv
    localparam real TR = inverter_delay(MU, SIGMA, SEED, STAGE, PATH, k, 0);
    localparam real TF = inverter_delay(MU, SIGMA, SEED, STAGE, PATH, k, 1);
    // Rest state with the input low: even inverters high, odd ones low.
    logic o;
    initial o = (k % 2 == 0);
    // A rising input makes the output fall after TF, a falling input makes
    // it rise after TR. Edges must be further apart than the delays.
    // The output takes the inverse of the input as it is after the wait,
    // so a glitch shorter than the delay cannot leave it wrong.
    always begin
      @(n[k]);
      if (n[k]) #(TF);
      else      #(TR);
      o = ~n[k];
    end
    assign n[k+1] = o;
  end

  assign y = n[NINV];
endmodule
