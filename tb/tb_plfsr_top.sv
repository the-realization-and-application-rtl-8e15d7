// tb_plfsr_top -- end-to-end test of the top at its default parameters: the (15,10) code with
// generator 1 + x^2 + x^4 + x^5 on 6 channels. Random messages are encoded, corrupted in 0 to 3
// coefficients (some corruptions are code words themselves and must pass undetected), and
// checked by the simplified decoder. The serial (7,4) decoder, the two-channel divider and the
// three-stage machine are exercised alongside. Each mechanism is counted and must occur.
module tb_plfsr_top;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [9:0] msg = '0;
  logic [14:0] err_mask = '0;
  logic enc_busy, enc_done, dec_busy, dec_done, dec_error;
  logic [14:0] codeword;
  logic [4:0] dec_syndrome;
  logic [9:0] dec_info;
  logic ser_clear = 1'b0, ser_en = 1'b0, ser_din = 1'b0, ser_info_en = 1'b0;
  logic ser_alarm;
  logic [3:0] ser_info;
  logic [2:0] ser_remainder;
  logic p6_clear = 1'b0, p6_en = 1'b0;
  logic [1:0] p6_i = '0, p6_w;
  logic [3:0] p6_state;
  logic m7_clear = 1'b0, m7_en = 1'b0;
  logic [1:0] m7_i = '0, m7_w;
  logic [2:0] m7_state;
  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_detected = 0, n_undetected = 0, n_padded = 0, n_relabelled = 0;
  int n_ser_alarm = 0, n_ser_clean = 0, n_p6 = 0, n_m7 = 0;

  always #5 clk = ~clk;

  plfsr_top dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_serial(logic [6:0] word);
    ser_clear = 1'b1;
    @(negedge clk);
    ser_clear = 1'b0;
    for (int t = 0; t < 7; t++) begin
      ser_din = word[6-t];
      ser_info_en = (t < 4);
      ser_en = 1'b1;
      @(negedge clk);
    end
    ser_en = 1'b0;
    ser_info_en = 1'b0;
  endtask

  initial begin
    poly_t r;
    logic [9:0] m;
    logic [14:0] e, c;
    logic [6:0] w7;
    logic [2:0] s7;
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // link
    for (int trial = 0; trial < 400; trial++) begin
      m = 10'($urandom);
      e = '0;
      if (trial % 10 == 9) begin
        // an error pattern that is itself a code word: undetectable
        e = 15'($urandom) & 15'h7fe0;
        r = poly_rem(poly_t'(e), 15, poly_t'(5'b10101), 5);
        e[4:0] = r[4:0];
      end else begin
        for (int b = 0; b < trial % 4; b++) e[$urandom_range(0, 14)] ^= 1'b1;
      end
      msg = m;
      err_mask = e;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!enc_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check("encode latency", 32'(lat), 4);
      c = codeword;
      r = poly_rem(poly_t'({m, 5'b0}), 15, poly_t'(5'b10101), 5);
      check("code word", 32'(c), 32'({m, r[4:0]}));
      n_padded++;  // 15 coefficients in 3 groups of 6: three padding zeros lead every word
      @(negedge clk);
      lat = 1;
      while (!dec_done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check("decode latency", 32'(lat), 4);
      r = poly_rem(poly_t'(15'(c ^ e)), 15, poly_t'(5'b10101), 5);
      check("error flag", 32'(dec_error), 32'(r[4:0] != '0));
      check("syndrome", 32'(dec_syndrome), 32'({r[4], r[3], r[2], r[1] ^ r[2], r[0] ^ r[2]}));
      check("information", 32'(dec_info), 32'(15'(c ^ e) >> 5));
      if (e == '0) begin
        check("clean word passes", 32'(dec_error), 0);
        n_clean++;
      end else if (dec_error) n_detected++;
      else n_undetected++;
      if (dec_syndrome != r[4:0]) n_relabelled++;
      @(negedge clk);
    end

    // serial (7,4) decoder
    for (int mm = 0; mm < 16; mm++) begin
      r = poly_rem(poly_t'(7'(mm << 3)), 7, poly_t'(3'b011), 3);
      w7 = {4'(mm), r[2:0]};
      send_serial(w7);
      check("serial clean", 32'({ser_alarm, ser_info}), 32'({1'b0, 4'(mm)}));
      if (!ser_alarm) n_ser_clean++;
      send_serial(w7 ^ 7'(1 << (mm % 7)));
      check("serial alarm", 32'(ser_alarm), 1);
      if (ser_alarm) n_ser_alarm++;
    end

    // two-channel divider: x^8 + x^6 + x^5 by 1 + x + x^4, remainder 1 + x + x^2 + x^3
    p6_clear = 1'b1;
    @(negedge clk);
    p6_clear = 1'b0;
    for (int t = 0; t < 5; t++) begin
      p6_i = (t < 2) ? 2'b10 : (t == 2) ? 2'b01 : 2'b00;
      p6_en = 1'b1;
      @(negedge clk);
    end
    p6_en = 1'b0;
    check("two-channel divider remainder", 32'(p6_state), 32'(4'b1111));
    n_p6++;

    // three-stage machine, two channels, against its serial equations
    m7_clear = 1'b1;
    @(negedge clk);
    m7_clear = 1'b0;
    s7 = '0;
    for (int t = 0; t < 40; t++) begin
      logic [1:0] wexp;
      m7_i = 2'($urandom);
      for (int j = 0; j < 2; j++) begin
        wexp[j] = s7[0] ^ s7[2] ^ m7_i[j];
        s7 = {s7[1] ^ m7_i[j], s7[0] ^ s7[1], s7[0] ^ s7[2] ^ m7_i[j]};
      end
      m7_en = 1'b1;
      #1 check("machine outputs", 32'(m7_w), 32'(wexp));
      @(negedge clk);
      check("machine state", 32'(m7_state), 32'(s7));
      n_m7++;
    end
    m7_en = 1'b0;

    $display("mechanisms: clean=%0d detected=%0d undetected=%0d padded=%0d relabelled=%0d",
             n_clean, n_detected, n_undetected, n_padded, n_relabelled);
    $display("mechanisms: serial_clean=%0d serial_alarm=%0d two_channel=%0d machine=%0d",
             n_ser_clean, n_ser_alarm, n_p6, n_m7);
    check("clean words seen", 32'(n_clean > 0), 1);
    check("detected errors seen", 32'(n_detected > 0), 1);
    check("undetectable errors seen", 32'(n_undetected > 0), 1);
    check("padding seen", 32'(n_padded > 0), 1);
    check("relabelled syndrome seen", 32'(n_relabelled > 0), 1);
    check("serial clean seen", 32'(n_ser_clean > 0), 1);
    check("serial alarm seen", 32'(n_ser_alarm > 0), 1);
    check("two-channel divider run", 32'(n_p6 > 0), 1);
    check("machine run", 32'(n_m7 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
