// tb_lsm_parallel -- checks the f-channel analog of the three-stage linear machine
// (s0+ = s0+s2+i, s1+ = s0+s1, s2+ = s1+i, w = s0+s2+i) against a serial model of its
// equations, on 2 channels and on 5 channels (more channels than states, so D' has terms below
// its diagonal), plain and relabelled.
module tb_lsm_parallel;
  import gf2_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Q with rows s0+s1, s1, s0+s2
  localparam kmat_t QX = kmat_t'({kvec_t'(3'b101), kvec_t'(3'b010), kvec_t'(3'b011)});

  logic [1:0] i2, w2, w2b;
  logic [4:0] i5, w5, w5q;
  logic [2:0] s2, s2b, s5, s5q;
  lsm_parallel dut2 (.clk, .rst_n, .clear, .en, .i_vec(i2), .w_vec(w2), .state(s2));
  lsm_parallel #(.Q_MODE(Q_BEST)) dut2b (.clk, .rst_n, .clear, .en, .i_vec(i2), .w_vec(w2b), .state(s2b));
  lsm_parallel #(.F(5)) dut5 (.clk, .rst_n, .clear, .en, .i_vec(i5), .w_vec(w5), .state(s5));
  lsm_parallel #(.F(5), .Q_MODE(Q_EXPLICIT), .Q(QX)) dut5q
    (.clk, .rst_n, .clear, .en, .i_vec(i5), .w_vec(w5q), .state(s5q));

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial model: one step of the three-stage machine
  function automatic logic [3:0] serial_step(logic [2:0] s, logic i);  // {w, s'}
    logic [2:0] n;
    n[0] = s[0] ^ s[2] ^ i;
    n[1] = s[0] ^ s[1];
    n[2] = s[1] ^ i;
    return {s[0] ^ s[2] ^ i, n};
  endfunction

  initial begin
    logic [2:0] ref2, ref5, nxt;
    logic [3:0] ws;
    logic [1:0] exp_w2;
    logic [4:0] exp_w5;
    i2 = '0; i5 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ref2 = '0; ref5 = '0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      if (cyc % 50 == 0) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        ref2 = '0; ref5 = '0;
      end
      i2 = 2'($urandom);
      i5 = 5'($urandom);
      for (int j = 0; j < 2; j++) begin
        ws = serial_step(ref2, i2[j]);
        exp_w2[j] = ws[3];
        ref2 = ws[2:0];
      end
      for (int j = 0; j < 5; j++) begin
        ws = serial_step(ref5, i5[j]);
        exp_w5[j] = ws[3];
        ref5 = ws[2:0];
      end
      en = 1'b1;
      #1;
      check("F=2 outputs", 32'(w2), 32'(exp_w2));
      check("F=2 best-Q outputs", 32'(w2b), 32'(exp_w2));
      check("F=5 outputs", 32'(w5), 32'(exp_w5));
      check("F=5 relabelled outputs", 32'(w5q), 32'(exp_w5));
      @(negedge clk);
      check("F=2 state", 32'(s2), 32'(ref2));
      check("F=2 best-Q zero iff zero", 32'(s2b == '0), 32'(ref2 == '0));
      check("F=5 state", 32'(s5), 32'(ref5));
      nxt = {ref5[0] ^ ref5[2], ref5[1], ref5[0] ^ ref5[1]};
      check("F=5 relabelled state", 32'(s5q), 32'(nxt));
      if (cyc % 7 == 3) begin  // hold: en low keeps the state
        en = 1'b0;
        @(negedge clk);
        check("hold", 32'(s5), 32'(ref5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
