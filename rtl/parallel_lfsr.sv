// parallel_lfsr -- F-channel parallel LFSR dividing by g(x).
//
// The serial divider by g(x) = G[0] + G[1] x + ... + x^K is the linear machine with T the
// companion matrix of g (sub-diagonal ones, G in the last column), B = e0 (input into the first
// stage only), C = e(K-1) (output from the last stage) and D = 0. This module builds its
// F-channel analog: F dividend coefficients enter per clock and F quotient coefficients leave,
// so an n-coefficient dividend takes q = ceil(n/F) clocks instead of n. T^F, B', C' and D' are
// formed at elaboration (gf2_pkg) and realised as an XOR network in front of K flip-flops.
//
// Interface: i_vec[0] is the coefficient that a serial divider would take first (the higher
// order one), i_vec[F-1] the last; w_vec[j] is the serial quotient output for the same slot.
// state bit j is the coefficient of x^j of the running remainder (relabelled by Q when Q_MODE
// is not Q_IDENTITY; the state is then zero exactly when the remainder is). clear, en, clk and
// rst_n behave as in lsm_parallel: one F-coefficient step per enabled rising edge.
//
// From the document: the companion-matrix construction, the input and output connections and
// the default g(x) = 1 + x + x^4 with F = 2 (its two-channel example, whose next-state
// equations are s0+ = I1+s2, s1+ = I0+s2+s3, s2+ = s0+s3, s3+ = s1, W0 = s3, W1 = s2).
module parallel_lfsr
  import gf2_pkg::*;
#(
  parameter int unsigned K      = 4,
  parameter int unsigned F      = 2,
  parameter kvec_t       G      = kvec_t'(4'b0011),
  parameter q_mode_e     Q_MODE = Q_IDENTITY,
  parameter kmat_t       Q      = identity(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [F-1:0] i_vec,
  output logic [F-1:0] w_vec,
  output logic [K-1:0] state
);

  localparam kvec_t IN_TAP  = kvec_t'(1);
  localparam kvec_t OUT_TAP = kvec_t'(1) << (K - 1);

  lsm_parallel #(
    .K(K), .F(F), .T(companion(K, G)), .B(IN_TAP), .C(OUT_TAP), .D(1'b0),
    .Q_MODE(Q_MODE), .Q(Q)
  ) u_machine (
    .clk, .rst_n, .clear, .en, .i_vec, .w_vec, .state
  );

endmodule
