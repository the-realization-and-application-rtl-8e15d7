// tb_cyclic_encoder -- checks random messages of the (15,10) code with generator
// 1 + x^2 + x^4 + x^5 on 6 channels: information part unchanged, check part equal to the
// long-division remainder, code word a multiple of g, and done exactly q + 1 = 4 cycles after
// start. Also a (7,4) encoder with 1 + x + x^3 on 2 channels against the worked example.
module tb_cyclic_encoder;
  import gf2_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [9:0] msg;
  logic [3:0] msg7;
  logic busy, done, busy7, done7;
  logic [14:0] cw;
  logic [6:0] cw7;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cyclic_encoder dut (.clk, .rst_n, .start, .msg, .busy, .done, .codeword(cw));
  cyclic_encoder #(.N(7), .K(3), .G(kvec_t'(3'b011)), .F(2)) dut7
    (.clk, .rst_n, .start, .msg(msg7), .busy(busy7), .done(done7), .codeword(cw7));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t r;
    int lat;
    logic [9:0] m;
    msg = '0; msg7 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // message 1011 (m(x) = 1 + x^2 + x^3) -> 1 + x^3 + x^5 + x^6
    msg7  = 4'b1101;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done7) @(negedge clk);
    check("(7,4) example code word", 32'(cw7), 32'(7'b1101001));
    for (int trial = 0; trial < 200; trial++) begin
      m = 10'($urandom);
      if (trial == 0) m = '0;
      msg   = m;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      msg   = ~m;
      lat   = 1;
      while (!done && lat < 20) begin
        check("busy while encoding", 32'(busy), 1);
        @(negedge clk);
        lat++;
      end
      check("latency q+1", 32'(lat), 4);
      r = poly_rem(poly_t'({m, 5'b0}), 15, poly_t'(5'b10101), 5);
      check("information part", 32'(cw[14:5]), 32'(m));
      check("check part", 32'(cw[4:0]), 32'(r[4:0]));
      r = poly_rem(poly_t'(cw), 15, poly_t'(5'b10101), 5);
      check("multiple of g", 32'(r[4:0]), 0);
      @(negedge clk);
      check("held after done", 32'(cw[14:5]), 32'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
