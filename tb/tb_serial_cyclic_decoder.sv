// tb_serial_cyclic_decoder -- checks the serial (7,4) decoder: the example word 1001011 gives no
// alarm and information 1011; every single and double error raises the alarm; random
// messages encoded by long division give no alarm and the right information register.
module tb_serial_cyclic_decoder;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic din = 1'b0;
  logic info_en = 1'b0;
  logic alarm;
  logic [3:0] info;
  logic [2:0] rem;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  serial_cyclic_decoder dut (.clk, .rst_n, .clear, .en, .din, .info_en, .alarm, .info,
    .remainder(rem));

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

  // word[j] is the coefficient of x^j; sent x^6 first
  task automatic send(logic [6:0] word);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int t = 0; t < 7; t++) begin
      din     = word[6-t];
      info_en = (t < 4);
      en      = 1'b1;
      @(negedge clk);
    end
    en = 1'b0;
    info_en = 1'b0;
    din = 1'b0;
  endtask

  initial begin
    poly_t r;
    logic [6:0] c;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    send(7'b1101001);  // 1 + x^3 + x^5 + x^6
    check("example: no alarm", 32'(alarm), 0);
    check("example: information 1011", 32'(info), 32'(4'b1101));
    for (int b = 0; b < 7; b++) begin
      send(7'b1101001 ^ (7'b1 << b));
      check("single error alarm", 32'(alarm), 1);
      for (int b2 = b + 1; b2 < 7; b2++) begin
        send(7'b1101001 ^ (7'b1 << b) ^ (7'b1 << b2));
        check("double error alarm", 32'(alarm), 1);
      end
    end
    for (int m = 0; m < 16; m++) begin
      r = poly_rem(poly_t'(7'(m << 3)), 7, poly_t'(3'b011), 3);
      c = {4'(m), r[2:0]};
      send(c);
      check("code word: no alarm", 32'(alarm), 0);
      check("code word: remainder", 32'(rem), 0);
      check("code word: information", 32'(info), 32'(m));
      send(c ^ 7'(1 << (m % 7)));
      check("corrupted: remainder", 32'(rem),
            32'(poly_rem(poly_t'(7'(c ^ 7'(1 << (m % 7)))), 7, poly_t'(3'b011), 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
