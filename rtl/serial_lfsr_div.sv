// serial_lfsr_div -- serial linear feedback shift register that divides by g(x).
//
// g(x) = G[0] + G[1] x + ... + G[K-1] x^(K-1) + x^K. The dividend is shifted in one coefficient
// per clock, highest order first. Each stage s_j takes the stage before it (the input for s_0)
// plus, where G[j] is 1, the output of the last stage s_(K-1), which is fed back to every tap.
// The last stage is also the quotient output: after K-1 shifts the first quotient coefficient
// appears at w, and after all n coefficients have been shifted in, the register holds the
// remainder, bit j being the coefficient of x^j.
//
// Interface: din is the next coefficient, shifted in on a rising clk edge when en is 1. clear
// (synchronous) empties the register and takes priority; rst_n is an asynchronous active-low
// reset. w = s_(K-1) is combinational from the register.
//
// The structure and the start from zero follow the document; the enable, the clear and the
// reset are this design's own. The default is g(x) = 1 + x + x^3, the document's (7,4) example.
module serial_lfsr_div #(
  parameter int unsigned  K = 3,
  parameter logic [K-1:0] G = 3'b011
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic         w,
  output logic [K-1:0] state
);

  logic fb;

  assign fb = state[K-1];
  assign w  = fb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
    end else if (clear) begin
      state <= '0;
    end else if (en) begin
      state[0] <= din ^ (G[0] & fb);
      for (int unsigned j = 1; j < K; j++) state[j] <= state[j-1] ^ (G[j] & fb);
    end
  end

endmodule
