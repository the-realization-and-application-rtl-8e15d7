// tb_cyclic_decoder -- sends code words of the (15,10) code, with 0 to 3 coefficients flipped,
// through the simplified decoder. The error flag must match a nonzero long-division remainder,
// the syndrome must equal Q r with the document's Q (rows r0+r2, r1+r2, r2, r3, r4), the
// information register the received information part, and done must come q + 1 = 4 cycles
// after start. A second decoder with an explicit identity Q must give the plain remainder.
module tb_cyclic_decoder;
  import gf2_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [14:0] rx;
  logic busy, done, error, busy_i, done_i, error_i;
  logic [4:0] syn, syn_i;
  logic [9:0] info, info_i;
  int checks = 0;
  int failures = 0;
  int n_err = 0;
  int n_ok = 0;

  always #5 clk = ~clk;

  cyclic_decoder dut (.clk, .rst_n, .start, .rx, .busy, .done, .error, .syndrome(syn), .info);
  cyclic_decoder #(.Q_MODE(Q_IDENTITY)) dut_i (.clk, .rst_n, .start, .rx, .busy(busy_i),
    .done(done_i), .error(error_i), .syndrome(syn_i), .info(info_i));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t r;
    logic [14:0] c, e;
    int lat;
    rx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("simplified XOR count", 32'(dut.u_div.u_machine.N_ADDERS), 16);
    check("unsimplified XOR count", 32'(dut_i.u_div.u_machine.N_ADDERS), 20);
    for (int trial = 0; trial < 300; trial++) begin
      c = 15'($urandom) & 15'h7fe0;
      r = poly_rem(poly_t'(c), 15, poly_t'(5'b10101), 5);
      c[4:0] = r[4:0];
      e = '0;
      for (int b = 0; b < trial % 4; b++) e[$urandom_range(0, 14)] ^= 1'b1;
      rx    = c ^ e;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      rx    = '0;
      lat   = 1;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check("latency q+1", 32'(lat), 4);
      r = poly_rem(poly_t'(15'(c ^ e)), 15, poly_t'(5'b10101), 5);
      check("error flag", 32'(error), 32'(r[4:0] != '0));
      check("syndrome = Q r", 32'(syn), 32'({r[4], r[3], r[2], r[1] ^ r[2], r[0] ^ r[2]}));
      check("plain remainder", 32'(syn_i), 32'(r[4:0]));
      check("same verdict", 32'(error_i), 32'(error));
      check("information register", 32'(info), 32'(15'(c ^ e) >> 5));
      if (error) n_err++; else n_ok++;
    end
    check("both outcomes seen", 32'(n_err > 0 && n_ok > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
