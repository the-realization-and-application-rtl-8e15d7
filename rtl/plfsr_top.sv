// plfsr_top -- parallel-LFSR error-detection link, with the document's smaller example circuits
// alongside.
//
// Link: a systematic cyclic encoder (unsimplified F-channel parallel LFSR) produces a code word;
// the channel flips the code-word coefficients selected by err_mask; a decoder whose parallel
// LFSR has been relabelled by the cheapest self-inverse Q divides the received word and raises
// dec_error when the remainder is nonzero. The decoder starts in the cycle the encoder reports
// done, so an operation takes q + 1 cycles to encode and q + 1 more to check, with
// q = ceil(N/F) (3 for the default 15-coefficient code on 6 channels).
//
// Alongside, each with its own ports: the serial (7,4) decoder with error alarm and information
// register (prefix ser_), the two-channel parallel divider by 1 + x + x^4 (prefix p6_) and the
// three-stage linear sequential machine in its two-channel form (prefix m7_). Their timing is
// described in serial_cyclic_decoder, parallel_lfsr and lsm_parallel.
//
// From the document: every block and the encoder/decoder arrangement in which only the decoder
// is simplified. This design's own: the code length N = 15, the error-mask channel and the
// start-on-done coupling of encoder and decoder.
module plfsr_top
  import gf2_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned K = 5,
  parameter kvec_t       G = kvec_t'(5'b10101),
  parameter int unsigned F = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  // encoder -> channel -> simplified decoder
  input  logic           start,
  input  logic [N-K-1:0] msg,
  input  logic [N-1:0]   err_mask,
  output logic           enc_busy,
  output logic           enc_done,
  output logic [N-1:0]   codeword,
  output logic           dec_busy,
  output logic           dec_done,
  output logic           dec_error,
  output logic [K-1:0]   dec_syndrome,
  output logic [N-K-1:0] dec_info,
  // serial (7,4) decoder
  input  logic           ser_clear,
  input  logic           ser_en,
  input  logic           ser_din,
  input  logic           ser_info_en,
  output logic           ser_alarm,
  output logic [3:0]     ser_info,
  output logic [2:0]     ser_remainder,
  // two-channel divider by 1 + x + x^4
  input  logic           p6_clear,
  input  logic           p6_en,
  input  logic [1:0]     p6_i,
  output logic [1:0]     p6_w,
  output logic [3:0]     p6_state,
  // three-stage linear sequential machine, two channels
  input  logic           m7_clear,
  input  logic           m7_en,
  input  logic [1:0]     m7_i,
  output logic [1:0]     m7_w,
  output logic [2:0]     m7_state
);

  logic [N-1:0] rx_word;

  cyclic_encoder #(.N(N), .K(K), .G(G), .F(F)) u_enc (
    .clk, .rst_n, .start, .msg, .busy(enc_busy), .done(enc_done), .codeword
  );

  assign rx_word = codeword ^ err_mask;

  cyclic_decoder #(.N(N), .K(K), .G(G), .F(F), .Q_MODE(Q_BEST)) u_dec (
    .clk, .rst_n, .start(enc_done), .rx(rx_word), .busy(dec_busy), .done(dec_done),
    .error(dec_error), .syndrome(dec_syndrome), .info(dec_info)
  );

  serial_cyclic_decoder #(.K(3), .G(3'b011), .INFO(4)) u_ser (
    .clk, .rst_n, .clear(ser_clear), .en(ser_en), .din(ser_din), .info_en(ser_info_en),
    .alarm(ser_alarm), .info(ser_info), .remainder(ser_remainder)
  );

  parallel_lfsr #(.K(4), .F(2), .G(kvec_t'(4'b0011))) u_p6 (
    .clk, .rst_n, .clear(p6_clear), .en(p6_en), .i_vec(p6_i), .w_vec(p6_w), .state(p6_state)
  );

  lsm_parallel #(.K(3), .F(2)) u_m7 (
    .clk, .rst_n, .clear(m7_clear), .en(m7_en), .i_vec(m7_i), .w_vec(m7_w), .state(m7_state)
  );

endmodule
