// output_network: the XOR output network Z of the secure PUF.
//
// Maps the Q arbiter responses r to QP < Q output bits. Output j (1-based)
// is the parity of X circularly adjacent responses starting S+1 positions
// after j:  o_j = r_{(j+S+1) mod Q} ^ ... ^ r_{(j+S+X) mod Q},
// with index 0 standing for r_Q. With the default (Q, QP, X, S) =
// (9, 8, 8, 1) each output is the parity of eight of the nine responses,
// leaving out r_{j+1}. Hiding Q-QP bits makes inverting the network
// ambiguous for a modelling attack, and mixing X rows brings each output's
// flip probability closer to one half. In the ports bit 0 is index 1.
// Purely combinational.
module output_network #(
  parameter int unsigned Q  = 9,
  parameter int unsigned QP = 8,
  parameter int unsigned X  = 8,
  parameter int unsigned S  = 1
) (
  input  logic [Q-1:0]  r,
  output logic [QP-1:0] o
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int unsigned j = 1; j <= QP; j++) begin
      o[j-1] = 1'b0;
      for (int unsigned i = 1; i <= X; i++)
        o[j-1] ^= r[((j + S + i) % Q + Q - 1) % Q];
    end
  end
endmodule
