// tb_table3 -- runs the seven generator / channel-count trials of the simplification study
// through the parallel divider with the cheapest self-inverse Q. For each it checks the
// two-input XOR count of the next-state network before relabelling (column A) and after it
// (column B, best case), and divides random words and multiples of g to check that the
// relabelled state is zero exactly when the long-division remainder is.
//   g = 1+x^2+x^4+x^5        f = 6, 8, 12   A = 20, 26, 34   B = 16, 22, 32
//   g = 1+x+x^2+x^4+x^5      f = 6, 8, 12   A = 18, 22, 34   B = 15, 20, 31
//   g = 1+x+x^2+x^4+x^5+x^7+x^9   f = 6     A = 35           B = 29
// (For the last trial the published column A reads 34; the construction gives 35.)
module tb_table3;
  import gf2_pkg::*;
  import tb_ref_pkg::*;

  localparam kvec_t GA = kvec_t'(5'b10101);
  localparam kvec_t GB = kvec_t'(5'b10111);
  localparam kvec_t GC = kvec_t'(9'b010110111);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic [11:0] din;
  logic [4:0] sa6, sa8, sa12, sb6, sb8, sb12;
  logic [8:0] sc6;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  parallel_lfsr #(.K(5), .F(6),  .G(GA), .Q_MODE(Q_BEST)) ua6  (.clk, .rst_n, .clear, .en, .i_vec(din[5:0]), .w_vec(), .state(sa6));
  parallel_lfsr #(.K(5), .F(8),  .G(GA), .Q_MODE(Q_BEST)) ua8  (.clk, .rst_n, .clear, .en, .i_vec(din[7:0]), .w_vec(), .state(sa8));
  parallel_lfsr #(.K(5), .F(12), .G(GA), .Q_MODE(Q_BEST)) ua12 (.clk, .rst_n, .clear, .en, .i_vec(din),      .w_vec(), .state(sa12));
  parallel_lfsr #(.K(5), .F(6),  .G(GB), .Q_MODE(Q_BEST)) ub6  (.clk, .rst_n, .clear, .en, .i_vec(din[5:0]), .w_vec(), .state(sb6));
  parallel_lfsr #(.K(5), .F(8),  .G(GB), .Q_MODE(Q_BEST)) ub8  (.clk, .rst_n, .clear, .en, .i_vec(din[7:0]), .w_vec(), .state(sb8));
  parallel_lfsr #(.K(5), .F(12), .G(GB), .Q_MODE(Q_BEST)) ub12 (.clk, .rst_n, .clear, .en, .i_vec(din),      .w_vec(), .state(sb12));
  parallel_lfsr #(.K(9), .F(6),  .G(GC), .Q_MODE(Q_BEST)) uc6  (.clk, .rst_n, .clear, .en, .i_vec(din[5:0]), .w_vec(), .state(sc6));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Divide one 48-coefficient word (a multiple of 6, 8 and 12) through the instance of the
  // given index, using f coefficients per clock; return whether its state ended at zero.
  task automatic divide(int idx, int f, poly_t p, output logic zero);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int s = 0; s < 48 / f; s++) begin
      din = '0;
      for (int j = 0; j < f; j++) din[j] = p[47-(s*f+j)];
      en = 1'b1;
      @(negedge clk);
    end
    en = 1'b0;
    case (idx)
      0: zero = (sa6 == '0);
      1: zero = (sa8 == '0);
      2: zero = (sa12 == '0);
      3: zero = (sb6 == '0);
      4: zero = (sb8 == '0);
      5: zero = (sb12 == '0);
      default: zero = (sc6 == '0);
    endcase
  endtask

  initial begin
    automatic int fs[7]  = '{6, 8, 12, 6, 8, 12, 6};
    automatic int ks[7]  = '{5, 5, 5, 5, 5, 5, 9};
    poly_t gs[7];
    poly_t p, r;
    logic zero;
    gs = '{poly_t'(GA[4:0]), poly_t'(GA[4:0]), poly_t'(GA[4:0]),
           poly_t'(GB[4:0]), poly_t'(GB[4:0]), poly_t'(GB[4:0]), poly_t'(GC[8:0])};
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("A  g1 f=6",  ua6.u_machine.N_ADDERS_RAW,  20);
    check("B  g1 f=6",  ua6.u_machine.N_ADDERS,      16);
    check("A  g1 f=8",  ua8.u_machine.N_ADDERS_RAW,  26);
    check("B  g1 f=8",  ua8.u_machine.N_ADDERS,      22);
    check("A  g1 f=12", ua12.u_machine.N_ADDERS_RAW, 34);
    check("B  g1 f=12", ua12.u_machine.N_ADDERS,     32);
    check("A  g2 f=6",  ub6.u_machine.N_ADDERS_RAW,  18);
    check("B  g2 f=6",  ub6.u_machine.N_ADDERS,      15);
    check("A  g2 f=8",  ub8.u_machine.N_ADDERS_RAW,  22);
    check("B  g2 f=8",  ub8.u_machine.N_ADDERS,      20);
    check("A  g2 f=12", ub12.u_machine.N_ADDERS_RAW, 34);
    check("B  g2 f=12", ub12.u_machine.N_ADDERS,     31);
    check("A  g3 f=6",  uc6.u_machine.N_ADDERS_RAW,  35);
    check("B  g3 f=6",  uc6.u_machine.N_ADDERS,      29);
    for (int idx = 0; idx < 7; idx++) begin
      for (int trial = 0; trial < 30; trial++) begin
        p = rand_poly(48);
        if (trial % 2 == 1) begin  // make it a multiple of g
          r = poly_rem(p, 48, gs[idx], ks[idx]);
          p ^= r;
        end
        r = poly_rem(p, 48, gs[idx], ks[idx]);
        divide(idx, fs[idx], p, zero);
        check($sformatf("trial %0d zero iff remainder zero", idx), 32'(zero), 32'(r == '0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
