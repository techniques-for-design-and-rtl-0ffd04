// tb_interconnect_network: every row must hold the challenge rotated by its
// row number, every row must differ from every other for a random
// challenge, and every input bit must reach every row.
module tb_interconnect_network;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64, Q = 9;
  int checks = 0, failures = 0;
  logic [N-1:0] x;
  logic [Q-1:0][N-1:0] c;

  interconnect_network #(.N(N), .Q(Q)) dut (.x(x), .c(c));

  initial begin
    for (int k = 0; k < 200; k++) begin
      x = (k < 64) ? (N'(1) << k) : {$urandom, $urandom};
      #1;
      for (int m = 0; m < int'(Q); m++) begin
        checks++;
        if (c[m] !== N'(rotate_row(N, m, MAXN'(x)))) begin
          failures++; $display("FAIL row %0d x=%h c=%h", m, x, c[m]);
        end
        if (k < 64) begin
          checks++;
          if ($countones(c[m]) != 1) begin failures++; $display("FAIL bit %0d lost in row %0d", k, m); end
        end
      end
      if (k >= 64)
        for (int m = 1; m < int'(Q); m++) begin
          checks++;
          if (c[m] === c[0]) begin failures++; $display("FAIL row %0d equals row 0", m); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
