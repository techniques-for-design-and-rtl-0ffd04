// window_counter: the measurement window of the characterization circuit.
//
// A W-bit counter runs on the system clock. In the last cycle of every
// 2^W-cycle window (counter all ones) it raises `read` for one cycle, so an
// external logic analyzer can take the error counters, and the same signal
// clears the error counters at the end of that cycle. With W = 9 this is
// every 512 cycles, as in the measured circuit. Which count value issues
// READ, and using one signal for READ and clear, are this design's choices.
// Reset is asynchronous, active low.
module window_counter #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         read,
  output logic [W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign read = (count == '1);
endmodule
