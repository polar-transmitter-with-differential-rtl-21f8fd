`timescale 1ns / 1ps
// tb_cal_dac: steps the 8-bit code by +/-1 in a slow source clock domain and
// checks that the 40 MHz DAC domain sees every value (Gray crossing within 3
// DAC clocks), that vcal_n is the complement of vcal_p, and that the pulse
// density over 8192 DAC clocks equals 0.25 + code/512 within 1/256.
module tb_cal_dac;
  logic clk_src = 1'b0, clk_dac = 1'b0, rst_n = 1'b0;
  logic [7:0] code = 8'd128, code_dac;
  logic vcal_p, vcal_n;
  int checks = 0, failures = 0;

  cal_dac dut (.clk_src, .clk_dac, .rst_n, .code, .code_dac, .vcal_p, .vcal_n);
  always #8.9 clk_src = ~clk_src;
  always #12.5 clk_dac = ~clk_dac;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_dac) if (rst_n) begin
    checks++;
    if (vcal_n == vcal_p) begin failures++; $display("not differential"); end
  end

  task automatic density(input int c);
    int ones;
    real e;
    @(posedge clk_src) code <= 8'(c);
    repeat (4) @(posedge clk_dac);
    #0.1;
    checks++;
    if (code_dac != 8'(c)) begin failures++; $display("code_dac %0d expected %0d", code_dac, c); end
    ones = 0;
    repeat (8192) begin @(posedge clk_dac); #0.1; ones += int'(vcal_p); end
    e = 8192.0 * (0.25 + c / 512.0);
    checks++;
    if (ones - e > 32.0 || ones - e < -32.0) begin failures++; $display("code %0d: %0d ones, expected %f", c, ones, e); end
  endtask

  initial begin
    #50 rst_n = 1'b1;
    density(0); density(255); density(128); density(37);
    // slow +/-1 walk: every value must arrive
    for (int k = 0; k < 300; k++) begin
      int c;
      c = code;
      c = (k < 150) ? (c < 255 ? c + 1 : c) : (c > 0 ? c - 1 : c);
      @(posedge clk_src) code <= 8'(c);
      repeat (3) @(posedge clk_dac);
      #0.1;
      checks++;
      if (code_dac != 8'(c)) begin failures++; $display("walk: code_dac %0d expected %0d", code_dac, c); end
      repeat (2) @(posedge clk_dac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
