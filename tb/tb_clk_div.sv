`timescale 1ns / 1ps
// tb_clk_div: checks the gated dividers by 4 and by 8 in cascade (by 32):
// output period 4x and 32x the input and 50% duty while enabled, no output
// edge while disabled (after the two-flop enable synchroniser), restart after
// re-enabling.
module tb_clk_div;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic c4, c32;
  int checks = 0, failures = 0;
  int n4, n32;
  realtime t4, t32;

  clk_div #(.DIV_LOG2(2)) d4 (.clk_in(clk), .rst_n, .en, .clk_out(c4));
  clk_div #(.DIV_LOG2(3)) d8 (.clk_in(c4), .rst_n, .en, .clk_out(c32));
  always #1 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(c4) begin
    n4++;
    if (n4 > 2) begin
      checks++;
      if ($realtime - t4 != 4.0) begin failures++; $display("div4 half period %f", $realtime - t4); end
    end
    t4 = $realtime;
  end
  always @(c32) begin
    n32++;
    if (n32 > 2) begin
      checks++;
      if ($realtime - t32 != 32.0) begin failures++; $display("div32 half period %f", $realtime - t32); end
    end
    t32 = $realtime;
  end

  initial begin
    #5 rst_n = 1'b1;
    #20 en = 1'b1;
    #3000;
    checks++;
    if (n32 < 80) begin failures++; $display("div32 too few edges %0d", n32); end
    en = 1'b0;
    #10;
    begin
      int a, b;
      a = n4; b = n32;
      #2000;
      checks++;
      if (n4 != a || n32 != b) begin failures++; $display("edges while disabled"); end
    end
    n4 = 0; n32 = 0;
    en = 1'b1;
    #3000;
    checks++;
    if (n32 < 80) begin failures++; $display("no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
