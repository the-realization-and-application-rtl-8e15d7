// tb_parallel_lfsr -- checks the parallel divider against the two-channel flow table for
// 1 + x + x^4, against long division for several channel counts (fewer and more channels than
// state bits), checks the relabelled decoder form for 1 + x^2 + x^4 + x^5 on six channels, and
// compares the matrices derived at elaboration with the worked examples (T^2 and B' for
// 1 + x + x^4; T^3 and B' for 1 + x + x^3 + x^4; T^6 and B' for 1 + x^2 + x^4 + x^5).
module tb_parallel_lfsr;
  import gf2_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // two-channel divider by 1 + x + x^4 (defaults)
  logic [1:0] i2, w2;
  logic [3:0] s2;
  parallel_lfsr dut2 (.clk, .rst_n, .clear, .en, .i_vec(i2), .w_vec(w2), .state(s2));

  // degree-8 divider on 3, 8 and 13 channels
  localparam kvec_t G8 = kvec_t'(8'h1D);
  logic [2:0]  i3, w3;
  logic [7:0]  i8, w8;
  logic [12:0] i13, w13;
  logic [7:0]  s3, s8, s13;
  parallel_lfsr #(.K(8), .F(3),  .G(G8)) dut3  (.clk, .rst_n, .clear, .en, .i_vec(i3),  .w_vec(w3),  .state(s3));
  parallel_lfsr #(.K(8), .F(8),  .G(G8)) dut8  (.clk, .rst_n, .clear, .en, .i_vec(i8),  .w_vec(w8),  .state(s8));
  parallel_lfsr #(.K(8), .F(13), .G(G8)) dut13 (.clk, .rst_n, .clear, .en, .i_vec(i13), .w_vec(w13), .state(s13));

  // 1 + x^2 + x^4 + x^5 on six channels: plain, with the document's Q, and with the best Q
  localparam kvec_t G5 = kvec_t'(5'b10101);
  localparam kmat_t QDOC = kmat_t'({kvec_t'(5'b10000), kvec_t'(5'b01000), kvec_t'(5'b00100),
                                    kvec_t'(5'b00110), kvec_t'(5'b00101)});
  logic [5:0] i6, w6p, w6e, w6b;
  logic [4:0] s6p, s6e, s6b;
  parallel_lfsr #(.K(5), .F(6), .G(G5)) dut6p (.clk, .rst_n, .clear, .en, .i_vec(i6), .w_vec(w6p), .state(s6p));
  parallel_lfsr #(.K(5), .F(6), .G(G5), .Q_MODE(Q_EXPLICIT), .Q(QDOC)) dut6e
    (.clk, .rst_n, .clear, .en, .i_vec(i6), .w_vec(w6e), .state(s6e));
  parallel_lfsr #(.K(5), .F(6), .G(G5), .Q_MODE(Q_BEST)) dut6b
    (.clk, .rst_n, .clear, .en, .i_vec(i6), .w_vec(w6b), .state(s6b));

  // 1 + x + x^3 + x^4 on three channels: the worked T^2 / T^3 / B' example
  logic [2:0] i3b, w3b;
  logic [3:0] s3b;
  parallel_lfsr #(.K(4), .F(3), .G(kvec_t'(4'b1011))) dut3b
    (.clk, .rst_n, .clear, .en, .i_vec(i3b), .w_vec(w3b), .state(s3b));

  // Compare row r of a matrix with a printed row, written column 0 first ("0111").
  task automatic check_row(string what, logic [63:0] got, string printed);
    logic [63:0] exp = '0;
    for (int c = 0; c < printed.len(); c++) exp[c] = (printed[c] == "1");
    check(what, got & ((64'(1) << printed.len()) - 1), exp);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flow table: inputs {I1, I0} per clock, state s3..s0 after it, outputs {W1, W0} before it.
  logic [1:0] tin[5]  = '{2'b10, 2'b10, 2'b01, 2'b00, 2'b00};
  logic [3:0] tst[5]  = '{4'b0001, 4'b0101, 4'b0101, 4'b0111, 4'b1111};
  logic [1:0] tw[5]   = '{2'b00, 2'b00, 2'b10, 2'b10, 2'b10};

  // drive one dividend of n coefficients through a divider of f channels; returns checks via
  // the shared counters. The dividend is padded with zeros at its high-order end.
  task automatic run_div8(int f, int n);
    poly_t p, r, q;
    int steps, t;
    steps = (n + f - 1) / f;
    p = rand_poly(n);
    r = poly_rem(p, n, poly_t'(8'h1D), 8);
    q = poly_quot(p, n, poly_t'(8'h1D), 8);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int s = 0; s < steps; s++) begin
      for (int j = 0; j < f; j++) begin
        t = s * f + j - (steps * f - n);   // serial time of slot j, negative in the padding
        if (f == 3)  i3[j]  = (t >= 0) ? p[n-1-t] : 1'b0;
        if (f == 8)  i8[j]  = (t >= 0) ? p[n-1-t] : 1'b0;
        if (f == 13) i13[j] = (t >= 0) ? p[n-1-t] : 1'b0;
      end
      en = 1'b1;
      #1;
      for (int j = 0; j < f; j++) begin
        logic got;
        t = s * f + j - (steps * f - n);
        got = (f == 3) ? w3[j] : (f == 8) ? w8[j] : w13[j];
        check($sformatf("F=%0d quotient slot %0d", f, j), 64'(got),
              (t >= 8) ? 64'(q[n-1-t]) : 64'(0));
      end
      @(negedge clk);
    end
    en = 1'b0;
    check($sformatf("F=%0d remainder", f), 64'(f == 3 ? s3 : 8'(f == 8 ? s8 : s13)), 64'(r[7:0]));
  endtask

  initial begin
    poly_t p, r;
    int n;
    i2 = '0; i3 = '0; i8 = '0; i13 = '0; i6 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // matrices derived at elaboration against the printed ones
    begin
      automatic string t2[4]  = '{"0010", "0011", "1001", "0100"};
      automatic string b2[4]  = '{"01", "10", "00", "00"};
      automatic string c2[2]  = '{"0001", "0010"};
      automatic string t3[4]  = '{"0111", "0100", "0010", "1110"};
      automatic string b3[4]  = '{"001", "010", "100", "000"};
      automatic string t6[5]  = '{"11011", "11101", "10101", "11010", "10110"};
      automatic string b6[5]  = '{"100001", "000010", "100100", "001000", "110000"};
      for (int r = 0; r < 4; r++) begin
        check_row($sformatf("f=2 T' row %0d", r), 64'(dut2.u_machine.TP[r]), t2[r]);
        check_row($sformatf("f=2 B' row %0d", r), 64'(dut2.u_machine.BP[r]), b2[r]);
        check_row($sformatf("f=3 T^3 row %0d", r), 64'(dut3b.u_machine.TP[r]), t3[r]);
        check_row($sformatf("f=3 B' row %0d", r), 64'(dut3b.u_machine.BP[r]), b3[r]);
      end
      for (int r = 0; r < 2; r++) begin
        check_row($sformatf("f=2 C' row %0d", r), 64'(dut2.u_machine.CP[r]), c2[r]);
        check_row($sformatf("f=2 D' row %0d", r), 64'(dut2.u_machine.DP[r]), "00");
      end
      for (int r = 0; r < 5; r++) begin
        check_row($sformatf("f=6 T^6 row %0d", r), 64'(dut6p.u_machine.TP[r]), t6[r]);
        check_row($sformatf("f=6 B' row %0d", r), 64'(dut6p.u_machine.BP[r]), b6[r]);
      end
      check("f=2 XOR count", 64'(dut2.u_machine.N_ADDERS), 64'(4));
    end
    i3b = '0;

    // flow table of x^8 + x^6 + x^5 divided by 1 + x + x^4
    for (int t = 0; t < 5; t++) begin
      i2 = tin[t];
      en = 1'b1;
      #1 check($sformatf("table W t=%0d", t), 64'(w2), 64'(tw[t]));
      @(negedge clk);
      check($sformatf("table S t=%0d", t + 1), 64'(s2), 64'(tst[t]));
    end
    en = 1'b0;
    check("table remainder 1+x+x^2+x^3", 64'(s2), 64'(4'b1111));

    for (int trial = 0; trial < 30; trial++) begin
      n = 9 + $urandom_range(0, 60);
      run_div8(3, n);
      run_div8(8, n);
      run_div8(13, n);
    end

    // relabelling: XOR counts and state against the document's Q (rows e0+e2, e1+e2, e2, e3, e4)
    check("raw adders", 64'(dut6p.u_machine.N_ADDERS), 64'(20));
    check("document Q adders", 64'(dut6e.u_machine.N_ADDERS), 64'(16));
    check("best Q adders", 64'(dut6b.u_machine.N_ADDERS), 64'(16));
    for (int trial = 0; trial < 40; trial++) begin
      n = 18;
      p = rand_poly(n);
      if (trial % 4 == 0) p = '0;
      r = poly_rem(p, n, poly_t'(5'b10101), 5);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      for (int s = 0; s < 3; s++) begin
        for (int j = 0; j < 6; j++) i6[j] = p[n-1-(s*6+j)];
        en = 1'b1;
        #1;
        check("relabelled outputs unchanged", 64'(w6e), 64'(w6p));
        check("best-Q outputs unchanged", 64'(w6b), 64'(w6p));
        @(negedge clk);
      end
      en = 1'b0;
      check("plain remainder", 64'(s6p), 64'(r[4:0]));
      check("document Q state", 64'(s6e),
            64'({r[4], r[3], r[2], r[1] ^ r[2], r[0] ^ r[2]}));
      check("best Q state", 64'(s6b), 64'(s6e));
      check("zero iff remainder zero", 64'(s6b == '0), 64'(r[4:0] == '0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
