// group_feeder -- presents an N-coefficient word to a parallel LFSR, F coefficients per clock.
//
// A parallel LFSR takes its dividend F coefficients at a time, highest order first, and needs
// q = ceil(N/F) clocks. When N is not a multiple of F, the word is extended with zero
// coefficients above its highest order one; these enter first, and since the register starts
// from zero they do not change the remainder. This block holds the padded word in a shift
// register, hands out one group per clock and counts the q steps.
//
// Interface: word[j] is the coefficient of x^j. A start while not busy loads the word; load is
// high in that same cycle so the client can clear its LFSR. During the next q cycles busy and
// step are high and group[0] is the higher-order coefficient of the group (the one a serial
// divider would take first), group[F-1] the lower-order one; last marks the final group. done
// is high for one cycle after the last step. A start while busy is ignored. rst_n is an
// asynchronous active-low reset.
//
// From the document: F coefficients per clock, q clocks, high order first, zero padding at the
// high-order end. The start/busy/done handshake is this design's own.
module group_feeder #(
  parameter int unsigned N = 15,
  parameter int unsigned F = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] word,
  output logic         load,
  output logic         busy,
  output logic         step,
  output logic [F-1:0] group,
  output logic         last,
  output logic         done
);

  localparam int unsigned STEPS = (N + F - 1) / F;  // q
  localparam int unsigned W     = STEPS * F;
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic [W-1:0]  sr;
  logic [CW-1:0] remaining;

  assign load = start && !busy;
  assign step = busy;
  assign last = busy && (remaining == CW'(1));

  always_comb begin
    for (int unsigned j = 0; j < F; j++) group[j] = sr[W-1-j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        sr        <= W'(word);
        remaining <= CW'(STEPS);
        busy      <= 1'b1;
      end else if (busy) begin
        sr        <= sr << F;
        remaining <= remaining - CW'(1);
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
