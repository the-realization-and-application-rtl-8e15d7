// serial_cyclic_decoder -- serial error-detecting decoder with an information message register.
//
// The received word is shifted, highest order first, into a serial LFSR dividing by g(x).
// After all N coefficients have been shifted in, the register holds the remainder, and the OR of
// its stages is the error alarm: zero means no detectable error. Alongside, an information
// register collects the information coefficients: the input passes an AND gate opened only
// while information coefficients arrive, and the register shifts only then.
//
// Interface: din is the next received coefficient, taken on a rising clk edge when en is 1.
// info_en must be 1 for the first N-K coefficients (the information part). clear
// (synchronous) empties both registers; rst_n is an asynchronous active-low reset. alarm is
// combinational and is meaningful after the N-th shift. info[j] is the information coefficient
// that multiplies x^(K+j) in the code word (info[INFO-1] arrived first). remainder[j] is the
// coefficient of x^j.
//
// From the document: the (7,4) decoder with g(x) = 1 + x + x^3, the OR alarm on the stage
// outputs and the gated information register. This design's own: the register shifts only when
// enabled (so it ends up holding exactly the information part), and the clear and reset.
module serial_cyclic_decoder #(
  parameter int unsigned  K    = 3,
  parameter logic [K-1:0] G    = 3'b011,
  parameter int unsigned  INFO = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic            din,
  input  logic            info_en,
  output logic            alarm,
  output logic [INFO-1:0] info,
  output logic [K-1:0]    remainder
);

  logic gated;

  serial_lfsr_div #(.K(K), .G(G)) u_div (
    .clk, .rst_n, .clear, .en, .din, .w(), .state(remainder)
  );

  assign alarm = |remainder;
  assign gated = din & info_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                info <= '0;
    else if (clear)            info <= '0;
    else if (en && info_en)    info <= {info[INFO-2:0], gated};
  end

endmodule
