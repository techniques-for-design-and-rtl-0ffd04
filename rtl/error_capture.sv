// error_capture: the capture stage of the delay characterization circuit,
// one per sample flip flop.
//
// The launch flip flop toggles every cycle and sends an edge through the PUF
// under test; a sample flip flop takes the path's output one clock later.
// This block checks whether the sampled value is the value that was
// launched: `sample` (sample flip flop output) is compared by XOR with the
// launch value of the previous cycle, and the result is registered in the
// capture flip flop. A T flip flop toggles on every captured error and the
// CNT_W-bit error counter advances each time the T flip flop falls, so the
// counter holds half the number of errors. Over a 512-cycle window at most
// 511 errors are captured, which leaves at most 255 counts: exactly the
// range of the 8-bit counter. `clear` (from the window counter) empties the
// counter and the T flip flop at the next edge.
//
// Timing: launch value of cycle k, sample taken at edge k+1, error captured
// at edge k+2, counter updated at edge k+3. The XOR, capture flip flop,
// T flip flop and 8-bit counter follow the drawn circuit; counting on the
// falling T transition, the synchronous clear and the saturation at the top
// count are this design's own. Reset is asynchronous, active low.
module error_capture #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             launch,   // launch flip flop output
  input  logic             sample,   // sample flip flop output
  input  logic             clear,
  output logic             err,      // capture flip flop
  output logic [CNT_W-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  logic expected;   // launch value of the previous cycle
  logic tff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expected <= 1'b0;
      err      <= 1'b0;
    end else begin
      expected <= launch;
      err      <= sample ^ expected;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tff   <= 1'b0;
      count <= '0;
    end else if (clear) begin
      tff   <= 1'b0;
      count <= '0;
    end else if (err) begin
      tff <= ~tff;
      if (tff && count != '1) count <= count + 1'b1;
    end
  end
endmodule
