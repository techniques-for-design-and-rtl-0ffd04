// input_network: the challenge transformation G placed in front of each PUF
// row of the secure PUF.
//
// A plain arbiter PUF violates the strict avalanche criterion: flipping
// challenge bit k flips the parity terms of all switches up to k, so late
// bits almost always flip the response and early bits rarely do. G makes
// every input bit flip two switch bits about N/2 switches apart, so that
// roughly half of the parity terms change whatever bit flips.
//
// KIND = NET_XOR (default, the one the source evaluates): a one-to-one XOR
// network on N bits (1-based indices, as in the source):
//   c[(N+2)/2]   = d[1]
//   c[(i+1)/2]   = d[i] ^ d[i+1]   for odd  i = 1, 3, ..., N-1
//   c[(N+i+2)/2] = d[i] ^ d[i+1]   for even i = 2, 4, ..., N-2
// KIND = NET_WIRE: c[i] = c[i+N/2] = d[i] for i = 1..N/2; only the lower N/2
// input bits are used.
// In the ports bit 0 is index 1. N must be even. Purely combinational.
module input_network
  import puf_pkg::*;
#(
  parameter int unsigned N    = 64,
  parameter in_net_e     KIND = NET_XOR
) (
  input  logic [N-1:0] d,
  output logic [N-1:0] c
);
  timeunit 1ps;
  timeprecision 1fs;

  if (N % 2 != 0) begin : g_bad_n
    $error("input_network: N must be even");
  end

  if (KIND == NET_XOR) begin : g_xor
    always_comb begin
      c = '0;
      c[N/2] = d[0];
      for (int unsigned i = 1; i <= N - 1; i += 2)
        c[(i + 1) / 2 - 1] = d[i-1] ^ d[i];
      for (int unsigned i = 2; i <= N - 2; i += 2)
        c[(N + i + 2) / 2 - 1] = d[i-1] ^ d[i];
    end
  end else begin : g_wire
    always_comb begin
      for (int unsigned i = 0; i < N / 2; i++) begin
        c[i]       = d[i];
        c[i + N/2] = d[i];
      end
    end
  end
endmodule
