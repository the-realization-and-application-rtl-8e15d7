// lsm_parallel -- f-channel analog of a single-input, single-output linear sequential machine.
//
// The serial machine is s(t+1) = T s(t) + B i(t), w(t) = C s(t) + D i(t) over GF(2). This
// module takes F consecutive serial inputs in one clock and produces the F serial outputs that
// the serial machine would have produced, so it runs F times as fast:
//   s(t+F) = T^F s(t) + B' [i(t) .. i(t+F-1)],  [w(t) .. w(t+F-1)] = C' s(t) + D' [i(t) ..].
// The matrices are computed at elaboration by gf2_pkg, so the hardware is a plain XOR network
// feeding K flip-flops. With Q_MODE other than Q_IDENTITY the state is relabelled,
// sigma = Q s, giving T* = Q T' Q^-1, B* = Q B', C* = C' Q^-1. The relabelled machine is
// isomorphic to the original and may need fewer XOR gates. Q_BEST takes the cheapest matrix of
// the self-inverse sample; Q_EXPLICIT uses the parameter Q.
//
// Interface: i_vec[j] is serial input i(t+j) (i_vec[0] is the earliest); w_vec[j] is w(t+j),
// combinational from the current state and i_vec. state is the (relabelled) state vector,
// bit j being flip-flop s_j. The state changes on a rising clk edge when en is 1. clear
// (synchronous) returns it to zero and takes priority over en; rst_n is an asynchronous
// active-low reset to zero.
//
// From the document: the theorem giving T', B', C' and D', the relabelling by Q and its
// self-inverse sample, and the XOR-count cost. This design's own choices: the enable, the
// synchronous clear, the reset and the fixed maximum sizes of gf2_pkg. The default is the
// three-stage machine of the document's worked example (s0+ = s0+s2+i, s1+ = s0+s1,
// s2+ = s1+i, w = s0+s2+i) with two channels; the document gives no channel count for it.
module lsm_parallel
  import gf2_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned F      = 2,
  parameter kmat_t       T      = kmat_t'({kvec_t'(3'b010), kvec_t'(3'b011), kvec_t'(3'b101)}),
  parameter kvec_t       B      = kvec_t'(3'b101),
  parameter kvec_t       C      = kvec_t'(3'b101),
  parameter logic        D      = 1'b1,
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

  // Machine matrices before relabelling.
  localparam kmat_t  TP = mat_pow(K, T, F);
  localparam kfmat_t BP = b_prime(K, F, T, B);
  localparam fkmat_t CP = c_prime(K, F, T, C);
  localparam ffmat_t DP = d_prime(K, F, T, B, C, D);

  // Relabelling matrix and its inverse.
  localparam int unsigned Q_INDEX = best_q_index(K, F, TP, BP);
  localparam kmat_t QM = (Q_MODE == Q_BEST)     ? q_sample(K, Q_INDEX) :
                         (Q_MODE == Q_EXPLICIT) ? Q : identity(K);
  localparam kmat_t QI = mat_inv(K, QM);

  // Matrices that are built.
  localparam kmat_t  TS = mat_mul(K, mat_mul(K, QM, TP), QI);
  localparam kfmat_t BS = q_times_b(K, F, QM, BP);
  localparam fkmat_t CS = c_times_q(K, F, CP, QI);

  // Two-input XOR count of the next-state network, before and after relabelling.
  localparam int unsigned N_ADDERS_RAW = adders(K, F, TP, BP);
  localparam int unsigned N_ADDERS     = adders(K, F, TS, BS);

  if (K < 1 || K > MAXK || F < 1 || F > MAXF) begin : g_bad_size
    $error("lsm_parallel: K must be 1..%0d and F 1..%0d", MAXK, MAXF);
  end
  if (!is_nonsingular(K, QM)) begin : g_bad_q
    $error("lsm_parallel: Q is singular");
  end

  logic [K-1:0] next_state;

  always_comb begin
    for (int unsigned r = 0; r < K; r++) begin
      next_state[r] = 1'b0;
      for (int unsigned c = 0; c < K; c++) next_state[r] ^= TS[r][c] & state[c];
      for (int unsigned c = 0; c < F; c++) next_state[r] ^= BS[r][c] & i_vec[c];
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < F; r++) begin
      w_vec[r] = 1'b0;
      for (int unsigned c = 0; c < K; c++) w_vec[r] ^= CS[r][c] & state[c];
      for (int unsigned c = 0; c < F; c++) w_vec[r] ^= DP[r][c] & i_vec[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (en)    state <= next_state;
  end

endmodule
