// tb_serial_lfsr_div -- checks the serial divider against the (7,4) flow table, the division of
// x^8 + x^6 + x^5 by 1 + x + x^4, and long
// division of random dividends by x^8 + x^4 + x^3 + x^2 + 1.
module tb_serial_lfsr_div;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic din = 1'b0;
  logic w3, w8;
  logic [2:0] s3;
  logic [7:0] s8;
  int checks = 0;
  int failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  serial_lfsr_div dut3 (.clk, .rst_n, .clear, .en, .din, .w(w3), .state(s3));
  logic w4;
  logic [8:0] dividend9 = 9'b101100000;
  logic [4:0] quotient5 = 5'b10101;
  logic [3:0] s4;
  serial_lfsr_div #(.K(4), .G(4'b0011)) dut4 (.clk, .rst_n, .clear, .en, .din, .w(w4), .state(s4));
  serial_lfsr_div #(.K(8), .G(8'h1D)) dut8 (.clk, .rst_n, .clear, .en, .din, .w(w8), .state(s8));

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

  // flow table: input I, then states x0 x1 x2 after each shift
  logic [6:0] table_in = 7'b1101000;  // I at t = 0..6, read left to right
  logic [2:0] table_x[7] = '{3'b001, 3'b011, 3'b110, 3'b110, 3'b111, 3'b101, 3'b001};
  logic       table_w[7] = '{0, 0, 0, 1, 1, 1, 1};

  initial begin
    poly_t p, r, q;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 7; t++) begin
      din = table_in[6-t];
      en  = 1'b1;
      check($sformatf("table w t=%0d", t), 32'(w3), 32'(table_w[t]));
      @(negedge clk);
      check($sformatf("table x t=%0d", t + 1), 32'(s3), 32'(table_x[t]));
    end
    check("remainder of x^6+x^5+x^3", 32'(s3), 32'h1);
    en = 1'b0;
    // x^8 + x^6 + x^5 by 1 + x + x^4: quotient x^4 + x^2 + 1, remainder 1 + x + x^2 + x^3
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < 9; t++) begin
      din = dividend9[8-t];
      en  = 1'b1;
      if (t >= 4) check("1+x+x^4 quotient", 32'(w4), 32'(quotient5[8-t]));
      @(negedge clk);
    end
    en = 1'b0;
    check("1+x+x^4 remainder", 32'(s4), 32'(4'b1111));
    // random dividends through the degree-8 divider
    for (int trial = 0; trial < 40; trial++) begin
      n = 9 + $urandom_range(0, 50);
      p = rand_poly(n);
      r = poly_rem(p, n, poly_t'(8'h1D), 8);
      q = poly_quot(p, n, poly_t'(8'h1D), 8);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check("cleared", 32'(s8), 0);
      for (int t = 0; t < n; t++) begin
        din = p[n-1-t];
        en  = 1'b1;
        // serial output at time t is quotient coefficient n-1-t once t >= K, zero before
        check("quotient bit", 32'(w8), (t >= 8) ? 32'(q[n-1-t]) : 0);
        @(negedge clk);
      end
      en = 1'b0;
      check("remainder", 32'(s8), 32'(r[7:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
