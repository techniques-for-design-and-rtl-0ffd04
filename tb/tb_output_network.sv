// tb_output_network: the (9,8,8,1) network and the (5,4,4,1) example
// against the equation, plus the property of (9,8,8,1) that output j is the
// parity of all nine responses except r_{j+1}.
module tb_output_network;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [8:0] r9;
  logic [7:0] o8;
  logic [4:0] r5;
  logic [3:0] o4;

  output_network #(.Q(9), .QP(8), .X(8), .S(1)) u9 (.r(r9), .o(o8));
  output_network #(.Q(5), .QP(4), .X(4), .S(1)) u5 (.r(r5), .o(o4));

  initial begin
    for (int v = 0; v < 512; v++) begin
      r9 = 9'(v);
      r5 = 5'(v);
      #1;
      checks++;
      if (o8 !== 8'(z_out(9, 8, 8, 1, MAXN'(r9)))) begin failures++; $display("FAIL 9 %b -> %b", r9, o8); end
      checks++;
      if (o4 !== 4'(z_out(5, 4, 4, 1, MAXN'(r5)))) begin failures++; $display("FAIL 5 %b -> %b", r5, o4); end
      for (int j = 1; j <= 8; j++) begin
        checks++;
        if (o8[j-1] !== (^r9 ^ r9[j % 9])) begin failures++; $display("FAIL skip j=%0d", j); end
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
