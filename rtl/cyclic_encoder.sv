// cyclic_encoder -- systematic encoder for an (N, N-K) cyclic code, built on a parallel LFSR.
//
// The code polynomial is f(x) = x^K m(x) + r(x), where r(x) is the remainder of x^K m(x)
// divided by the generator g(x) of degree K. The message m(x) (N-K coefficients) followed by K
// zero coefficients is fed, F coefficients per clock and highest order first, through an
// F-channel parallel LFSR dividing by g(x); after q = ceil(N/F) clocks the LFSR holds r(x). The
// information coefficients are passed through unchanged, so the code is systematic. The encoder
// LFSR is never relabelled: only the true remainder gives correct check coefficients.
//
// Interface: msg[j] is the coefficient of x^j of m(x). A start while not busy begins an
// operation; busy is then high for q cycles and done pulses for one cycle after them.
// codeword[j] is the coefficient of x^j of f(x) (codeword[N-1:K] = msg, codeword[K-1:0] =
// r(x)); it is valid from done until the next start.
//
// From the document: systematic encoding by division, the parallel LFSR and the rule that the
// encoder is not simplified. Default code: generator 1 + x^2 + x^4 + x^5 with F = 6 channels,
// the document's simplification example; the length N = 15 is this design's choice (the period
// of that generator). The handshake is this design's own.
module cyclic_encoder
  import gf2_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned K = 5,
  parameter kvec_t       G = kvec_t'(5'b10101),
  parameter int unsigned F = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-K-1:0] msg,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   codeword
);

  logic           load, step;
  logic [F-1:0]   group;
  logic [N-K-1:0] msg_q;
  logic [K-1:0]   remainder;

  group_feeder #(.N(N), .F(F)) u_feed (
    .clk, .rst_n, .start, .word({msg, K'(0)}), .load, .busy, .step, .group, .last(), .done
  );

  parallel_lfsr #(.K(K), .F(F), .G(G), .Q_MODE(Q_IDENTITY)) u_div (
    .clk, .rst_n, .clear(load), .en(step), .i_vec(group), .w_vec(), .state(remainder)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    msg_q <= '0;
    else if (load) msg_q <= msg;
  end

  assign codeword = {msg_q, remainder};

endmodule
