// interconnect_network: binds the challenge inputs of the Q rows of the
// secure PUF together.
//
// Every input bit goes to every row, so one flipped input bit reaches all
// rows, and each row's output flips with probability one half. Row m
// (0-based) receives the challenge circularly shifted by m positions:
// row m bit i = x[(i - m) mod N]. Row 0 takes the challenge as it is, row 1
// takes x[N-1], x[0], ..., x[N-2]. Because no two rows see the same
// permutation, an attacker who applies the inverse of the input network can
// fully bypass it in one row only. The shift direction follows the first two
// rows drawn for this network; the shift amount per row is this design's
// reading of the per-row permutation. Purely combinational wiring.
module interconnect_network #(
  parameter int unsigned N = 64,
  parameter int unsigned Q = 9
) (
  input  logic [N-1:0]        x,
  output logic [Q-1:0][N-1:0] c
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    for (int unsigned m = 0; m < Q; m++)
      for (int unsigned i = 0; i < N; i++)
        c[m][i] = x[(i + N - (m % N)) % N];
  end
endmodule
