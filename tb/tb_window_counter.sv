// tb_window_counter: READ must be high for exactly one cycle in every 512,
// with 511 low cycles between two READ pulses.
module tb_window_counter;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic read;
  logic [8:0] count;
  int since = -1, pulses = 0;

  always #5000 clk = ~clk;

  window_counter #(.W(9)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (read) begin
      if (since >= 0) begin
        checks++;
        if (since != 511) begin failures++; $display("FAIL READ after %0d cycles", since); end
      end else begin
        checks++;   // first READ comes 511 cycles after reset
        if (count !== 9'h1ff) begin failures++; $display("FAIL first READ"); end
      end
      since = 0;
      pulses++;
    end else if (since >= 0) since++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    repeat (512 * 6 + 10) @(posedge clk);
    checks++;
    if (pulses != 6) begin failures++; $display("FAIL %0d READ pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
