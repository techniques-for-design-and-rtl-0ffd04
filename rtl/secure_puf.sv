// secure_puf: the secure PUF architecture. A challenge of N bits goes through
// the interconnect network to Q rows; each row transforms it with its own
// input network G and evaluates it on a parallel arbiter PUF; the output
// network Z mixes the Q responses into QP output bits.
//
// Interface: hold `challenge` stable, drive `launch` from low to high; after
// the path delay (about N * MU_SW, 32 ns with the defaults) plus the
// arbiter's settling time, r (raw row responses) and o (PUF output) are
// valid and hold until the next rising launch edge. launch must then return
// low for at least one path delay before the next evaluation.
//
// The defaults are the configuration the source evaluates: N = 64 switches
// per row and (Q, QP, X, S) = (9, 8, 8, 1), link delays N(0.5 ns, 4 ps).
// Row m draws its delays from seed SEED + m, so the rows are different
// "chips". The PUF rows are behavioural delay models; the networks are
// synthesizable logic. In the source the networks are added by
// reconfiguring the FPGA after the rows have been characterized; here they
// are simply always present.
module secure_puf
  import puf_pkg::*;
#(
  parameter int unsigned N         = 64,
  parameter int unsigned Q         = 9,
  parameter int unsigned QP        = 8,
  parameter int unsigned X         = 8,
  parameter int unsigned S         = 1,
  parameter in_net_e     KIND      = NET_XOR,
  parameter int unsigned SEED      = 100,
  parameter real         MU_SW     = 500.0,
  parameter real         SIGMA_SW  = 4.0,
  parameter real         SIGMA_ARB = 1.0
) (
  input  logic          launch,
  input  logic [N-1:0]  challenge,
  output logic [Q-1:0]  r,
  output logic [QP-1:0] o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [Q-1:0][N-1:0] row_in;    // after the interconnect network
  logic [Q-1:0][N-1:0] row_chal;  // after each row's input network

  interconnect_network #(.N(N), .Q(Q)) u_ic (.x(challenge), .c(row_in));

  for (genvar m = 0; m < Q; m++) begin : g_row
    input_network #(.N(N), .KIND(KIND)) u_g (.d(row_in[m]), .c(row_chal[m]));
    arbiter_puf #(
      .N(N), .NINV(0), .SEED(SEED + m), .MU_SW(MU_SW), .SIGMA_SW(SIGMA_SW),
      .SIGMA_ARB(SIGMA_ARB)
    ) u_puf (
      .launch(launch), .c(row_chal[m]), .r(r[m])
    );
  end

  output_network #(.Q(Q), .QP(QP), .X(X), .S(S)) u_z (.r(r), .o(o));
endmodule
