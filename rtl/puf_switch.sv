// puf_switch: behavioural model of one 2-input/2-output switch of a delay
// based arbiter PUF (not synthesizable logic: it models wire and LUT delays).
//
// The switch passes its two inputs straight (sel = 0: in0->out0, in1->out1)
// or crossed (sel = 1: in0->out1, in1->out0). Each of the four links has its
// own propagation delay, as in the four-delay switch model the analysis uses;
// the delays are fixed per instance (manufacturing variation). Which select
// value means "straight" is this design's choice.
//
// Timing: an edge on in0/in1 reaches the selected output after the delay of
// the link it takes. sel must be stable while an edge travels, and edges on
// one input must be further apart than the link delay.
module puf_switch #(
  parameter real D00 = 500.0,   // in0 -> out0 (straight, top), ps
  parameter real D01 = 500.0,   // in0 -> out1 (cross), ps
  parameter real D10 = 500.0,   // in1 -> out0 (cross), ps
  parameter real D11 = 500.0    // in1 -> out1 (straight, bottom), ps
) (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic out0,
  output logic out1
);
  timeunit 1ps;
  timeprecision 1fs;

  logic a0, a1;   // input each output currently listens to

  assign a0 = sel ? in1 : in0;
  assign a1 = sel ? in0 : in1;

  // Outputs start at the level of their inputs (no edge travels at power-up).
  initial begin
    #(0.001);
    out0 = a0;
    out1 = a1;
  end

  // Each output follows its selected input after that link's delay. The
  // output takes the input's value as it is after the wait, so it always
  // settles to the right level.
  always begin
    @(a0);
    if (sel) #(D10);
    else     #(D00);
    out0 = a0;
  end

  always begin
    @(a1);
    if (sel) #(D01);
    else     #(D11);
    out1 = a1;
  end

endmodule
