`timescale 1ns / 1ps
// tb_fll_ctrl: closes the integral counter and FSM around a model of the
// VCO (f = 100*S + code) and an ideal detector (UP below target, DN above).
// Checks: reset starts coarse mode with S = 16 and code 128; S moves by one
// per decision in coarse mode; the FSM switches to fine mode at the first
// reversal; the fine code moves by one per decision and settles on the
// target; the code saturates at 0 / 255; recal restarts coarse tuning and
// the bank end also ends coarse mode.
module tb_fll_ctrl;
  import polar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, recal = 1'b0, up = 1'b0, dn = 1'b0;
  logic [4:0] s_word;
  logic [7:0] dac_code;
  fll_mode_e mode;
  int checks = 0, failures = 0;
  int target, coarse_steps, fine_steps, switches;

  fll_ctrl dut (.clk, .rst_n, .recal, .up, .dn, .s_word, .dac_code, .mode);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(input int n);
    for (int k = 0; k < n; k++) begin
      int f, s0, c0;
      fll_mode_e m0;
      f = 100 * int'(s_word) + int'(dac_code);
      s0 = s_word; c0 = dac_code; m0 = mode;
      @(posedge clk);
      up <= (f < target); dn <= (f > target);
      @(posedge clk);
      up <= 1'b0; dn <= 1'b0;
      repeat (2) @(posedge clk);
      #0.1;
      if (m0 == FLL_COARSE && mode == FLL_COARSE && f != target) begin
        checks++; coarse_steps++;
        if ((s_word - s0 != 1) && (s0 - s_word != 1)) begin failures++; $display("coarse step %0d->%0d", s0, s_word); end
      end
      if (m0 == FLL_FINE && f != target) begin
        checks++; fine_steps++;
        if ((dac_code - c0 != 1) && (c0 - dac_code != 1) && dac_code != 0 && dac_code != 255) begin
          failures++; $display("fine step %0d->%0d", c0, dac_code);
        end
      end
      if (m0 != mode) switches++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #0.1;
    checks++;
    if (mode != FLL_COARSE || s_word != 5'd16 || dac_code != 8'd128) begin failures++; $display("reset state"); end
    target = 2170;
    decide(120);
    checks += 3;
    if (mode != FLL_FINE) begin failures++; $display("not in fine mode"); end
    if (s_word != 5'd21) begin failures++; $display("S = %0d", s_word); end
    if (dac_code < 69 || dac_code > 71) begin failures++; $display("code %0d", dac_code); end
    // upward saturation of the fine code
    target = 100 * 21 + 400;
    decide(300);
    checks++;
    if (dac_code != 8'd255) begin failures++; $display("no saturation: %0d", dac_code); end
    // recal from a far target: bank end
    target = -50;
    @(posedge clk) recal <= 1'b1;
    @(posedge clk) recal <= 1'b0;
    #0.1;
    checks++;
    if (mode != FLL_COARSE) begin failures++; $display("recal ignored"); end
    decide(40);
    checks += 2;
    if (s_word != 5'd0 || mode != FLL_FINE) begin failures++; $display("bank end: S=%0d mode=%0d", s_word, mode); end
    decide(300);
    if (dac_code != 8'd0) begin failures++; $display("no saturation at 0: %0d", dac_code); end
    checks++;
    if (coarse_steps < 10 || fine_steps < 100 || switches < 2) begin
      failures++; $display("mechanisms: coarse %0d fine %0d switches %0d", coarse_steps, fine_steps, switches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
