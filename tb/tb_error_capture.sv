// tb_error_capture: drives the launch toggle and a sample that is either the
// launched value one cycle later (correct) or its inverse (error), with a
// random error pattern. Checks the capture flip flop against the pattern,
// that the counter holds floor(errors / 2), that clear empties it, and that
// it stops at its top value.
module tb_error_capture;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic launch = 0, sample = 0, clear = 0;
  logic err;
  logic [7:0] count;
  bit pattern [$];

  always #5000 clk = ~clk;

  error_capture #(.CNT_W(8)) dut (.*);

  // One cycle: launch toggles; the sample taken at this edge is the value
  // launched one cycle before, inverted when `bad`.
  task automatic step(bit bad);
    @(posedge clk);
    #1;
    sample = launch ^ bad;   // launch still holds the value of the last cycle
    launch = ~launch;
  endtask

  task automatic window(int n_cycles, real p_err, int max_expect);
    int errors;
    errors = 0;
    for (int k = 0; k < n_cycles; k++) begin
      bit bad;
      bad = (real'($urandom_range(999)) < p_err * 1000.0);
      step(bad);
      errors += bad;
    end
    step(0); step(0); step(0);    // let the pipeline drain
    checks++;
    if (count !== 8'((errors / 2 > max_expect) ? max_expect : errors / 2)) begin
      failures++; $display("FAIL count %0d for %0d errors", count, errors);
    end
    $display("%0d errors -> count %0d", errors, count);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (count !== 0) begin failures++; $display("FAIL clear"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // directed: single error appears on err, 2 errors -> count 1
    step(0); step(1); step(0);
    checks++;
    if (err !== 1'b1) begin failures++; $display("FAIL capture flip flop"); end
    step(0);
    checks++;
    if (err !== 1'b0 || count !== 0) begin failures++; $display("FAIL after one error"); end
    step(1); step(0); step(0); step(0);
    checks++;
    if (count !== 8'd1) begin failures++; $display("FAIL two errors -> %0d", count); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    window(500, 0.0, 255);
    window(500, 0.3, 255);
    window(500, 1.0, 255);
    window(600, 1.0, 255);    // more than the 8-bit range: stops at 255
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
