// tb_input_network: checks the XOR network against its equations (1-based
// reference), that it is one-to-one (the input is recovered by the inverse
// chain d1 = c[(N+2)/2], d2 = c1 ^ d1, ...), that flipping one input bit
// flips two challenge bits N/2 positions apart (one bit for d_N), and the
// wire-only network.
module tb_input_network;
  import puf_pkg::*;
  import tb_puf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = 64;
  int checks = 0, failures = 0;
  logic [N-1:0] d, c, cw;

  input_network #(.N(N), .KIND(NET_XOR))  u_xor  (.d(d), .c(c));
  input_network #(.N(N), .KIND(NET_WIRE)) u_wire (.d(d), .c(cw));

  function automatic logic [N-1:0] invert(logic [N-1:0] cc);
    logic [N-1:0] dd;
    // 1-based: d1 = c_{(N+2)/2}; d_{i+1} = c_{(i+1)/2} ^ d_i (odd i);
    // d_{i+1} = c_{(N+i+2)/2} ^ d_i (even i)
    dd[0] = cc[N/2];
    for (int i = 1; i <= int'(N) - 1; i++) begin
      if (i % 2 == 1) dd[i] = cc[(i + 1) / 2 - 1] ^ dd[i-1];
      else            dd[i] = cc[(int'(N) + i + 2) / 2 - 1] ^ dd[i-1];
    end
    return dd;
  endfunction

  initial begin
    for (int k = 0; k < 300; k++) begin
      logic [N-1:0] c0;
      d = {$urandom, $urandom};
      #1;
      checks++;
      if (c !== N'(g_xor(N, MAXN'(d)))) begin
        failures++; $display("FAIL xor %h -> %h", d, c);
      end
      checks++;
      if (cw !== N'(g_wire(N, MAXN'(d)))) begin failures++; $display("FAIL wire %h", d); end
      checks++;
      if (invert(c) !== d) begin failures++; $display("FAIL not invertible %h", d); end
      if (k < 64) begin
        int flips, first, second;
        c0 = c;
        d[k] = ~d[k];
        #1;
        flips = $countones(c ^ c0);
        checks++;
        if (flips != ((k == N - 1) ? 1 : 2)) begin
          failures++; $display("FAIL bit %0d flips %0d challenge bits", k, flips);
        end
        if (flips == 2) begin
          first = -1; second = -1;
          for (int i = 0; i < int'(N); i++)
            if ((c ^ c0) >> i & 1) begin if (first < 0) first = i; else second = i; end
          checks++;
          if (second - first < int'(N) / 2 - 1 || second - first > int'(N) / 2 + 1) begin
            failures++; $display("FAIL bit %0d flips %0d and %0d", k, first, second);
          end
        end
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
