// tb_challenge_gen: SYNCH pulses from an unrelated clock must step the
// challenge through 0, 1, 3, 7, 15, 31, 63, 127 and back to 0, exactly once
// per pulse, and hold it in between.
module tb_challenge_gen;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, synch = 0;
  logic [7:0] challenge;
  logic advanced;
  int adv = 0;

  always #5000 clk = ~clk;
  always @(posedge clk) if (advanced) adv++;

  challenge_gen #(.W(8)) dut (.*);

  initial begin
    logic [7:0] expect_c;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    expect_c = 8'd0;
    checks++;
    if (challenge !== 8'd0) begin failures++; $display("FAIL reset value"); end
    for (int k = 0; k < 18; k++) begin
      #(37000 + 1234 * k);
      synch = 1; #70000; synch = 0;   // SYNCH from the generator's domain
      #50000;
      expect_c = (expect_c == 8'd127) ? 8'd0 : {expect_c[6:0], 1'b1};
      checks++;
      if (challenge !== expect_c) begin failures++; $display("FAIL step %0d: %0d vs %0d", k, challenge, expect_c); end
    end
    checks++;
    if (adv != 18) begin failures++; $display("FAIL %0d advances", adv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
