// cyclic_decoder -- error-detecting decoder for an (N, N-K) cyclic code, with a simplified
// parallel LFSR.
//
// The received word m*(x) is divided by g(x) in an F-channel parallel LFSR, F coefficients per
// clock, highest order first, over q = ceil(N/F) clocks. A nonzero remainder means a detectable
// error. Because only zero versus nonzero matters, the LFSR's state may be relabelled by any
// nonsingular Q (sigma = Q s): sigma is zero exactly when the remainder is. The default takes the
// cheapest Q of the self-inverse sample (Q_BEST), which for the default code cuts the
// next-state XOR network from 20 to 16 two-input gates. The information coefficients of the
// received word are kept in an information register.
//
// Interface: rx[j] is the coefficient of x^j of the received word. A start while not busy begins
// an operation; busy is high for q cycles and done pulses for one cycle after them. error (the
// OR of all state bits), syndrome (the relabelled remainder Q r*(x)) and info (rx[N-1:K]) are
// valid from done until the next start.
//
// From the document: division of the received word, the OR of the state bits as error alarm,
// the information register, the relabelling by Q restricted to the decoder and the sample of Q
// matrices. Default code: generator 1 + x^2 + x^4 + x^5, F = 6; N = 15 is this design's choice.
// The handshake, and loading the information register from the word at start, are this
// design's own.
module cyclic_decoder
  import gf2_pkg::*;
#(
  parameter int unsigned N      = 15,
  parameter int unsigned K      = 5,
  parameter kvec_t       G      = kvec_t'(5'b10101),
  parameter int unsigned F      = 6,
  parameter q_mode_e     Q_MODE = Q_BEST,
  parameter kmat_t       Q      = identity(K)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   rx,
  output logic           busy,
  output logic           done,
  output logic           error,
  output logic [K-1:0]   syndrome,
  output logic [N-K-1:0] info
);

  logic         load, step;
  logic [F-1:0] group;

  group_feeder #(.N(N), .F(F)) u_feed (
    .clk, .rst_n, .start, .word(rx), .load, .busy, .step, .group, .last(), .done
  );

  parallel_lfsr #(.K(K), .F(F), .G(G), .Q_MODE(Q_MODE), .Q(Q)) u_div (
    .clk, .rst_n, .clear(load), .en(step), .i_vec(group), .w_vec(), .state(syndrome)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    info <= '0;
    else if (load) info <= rx[N-1:K];
  end

  assign error = |syndrome;

endmodule
