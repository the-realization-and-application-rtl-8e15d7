// tb_group_feeder -- checks the group order, zero padding, step count, done timing and that a
// start while busy is ignored, for 15 coefficients on 6 channels and 14 on 7.
module tb_group_feeder;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [14:0] word15;
  logic [13:0] word14;
  logic load_a, busy_a, step_a, last_a, done_a;
  logic load_b, busy_b, step_b, last_b, done_b;
  logic [5:0] grp_a;
  logic [6:0] grp_b;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  group_feeder #(.N(15), .F(6)) dut_a (.clk, .rst_n, .start, .word(word15), .load(load_a),
    .busy(busy_a), .step(step_a), .group(grp_a), .last(last_a), .done(done_a));
  group_feeder #(.N(14), .F(7)) dut_b (.clk, .rst_n, .start, .word(word14), .load(load_b),
    .busy(busy_b), .step(step_b), .group(grp_b), .last(last_b), .done(done_b));

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
    logic [17:0] padded;
    logic [14:0] w;
    logic [13:0] v;
    word15 = '0; word14 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int trial = 0; trial < 50; trial++) begin
      w = 15'($urandom);
      v = 14'($urandom);
      word15 = w;
      word14 = v;
      start  = 1'b1;
      #1;
      check("load", 32'({load_a, load_b}), 32'b11);
      @(negedge clk);
      word15 = ~w;    // must have been captured already
      word14 = ~v;
      start  = (trial % 3 == 0);  // start while busy: ignored
      padded = {3'b000, w};
      for (int s = 0; s < 3; s++) begin
        check("busy/step a", 32'({busy_a, step_a, load_a}), 32'b110);
        check("group a", 32'(grp_a), 32'({padded[17-6*s-5], padded[17-6*s-4], padded[17-6*s-3],
                                          padded[17-6*s-2], padded[17-6*s-1], padded[17-6*s]}));
        check("last a", 32'(last_a), 32'(s == 2));
        check("done a low", 32'(done_a), 0);
        if (s < 2) begin
          check("busy b", 32'(busy_b), 1);
          for (int j = 0; j < 7; j++) check("group b", 32'(grp_b[j]), 32'(v[13-7*s-j]));
          check("last b", 32'(last_b), 32'(s == 1));
        end else begin
          check("done b after 2 steps", 32'({done_b, busy_b}), 32'b10);
        end
        @(negedge clk);
        start = 1'b0;
      end
      check("done a after 3 steps", 32'({done_a, busy_a}), 32'b10);
      @(negedge clk);
      check("done a is one cycle", 32'(done_a), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
