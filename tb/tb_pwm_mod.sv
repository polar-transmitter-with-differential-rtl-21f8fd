`timescale 1ns / 1ps
// tb_pwm_mod: runs the IF pulse-width modulator with the delay-line model
// (unit delay 1/(2*256*3.25 MHz)) and a 26 MHz clock. For random envelopes it
// checks that the code is round(env/256) clamped to 255, that F_IF runs at
// 3.25 MHz, and that after every F_IF edge the output pulse lasts code unit
// delays (within 20 ps), i.e. a duty cycle of code/256; code 0 gives no pulse.
module tb_pwm_mod;
  localparam real UNIT = 1.0e3 / (2.0 * 256.0 * 3.25);   // ns
  localparam real TCLK = 1.0e3 / 26.0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] env = '0;
  logic [255:1] taps;
  logic f_if, pwm_out;
  logic [7:0] code;
  int checks = 0, failures = 0;
  real t_rise, t_edge, t_last_if;
  int  pulses, edges;

  pwm_mod #(.L(256), .IF_DIV(8)) dut (.clk, .rst_n, .env, .taps, .f_if, .code, .pwm_out);
  pwm_delay_line #(.L(256), .UNIT_NS(UNIT)) u_dl (.f_if, .taps);

  always #(TCLK / 2.0) clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge f_if) if (rst_n) begin
    if (t_last_if > 0.0) begin
      checks++;
      if (($realtime - t_last_if) - 8.0 * TCLK > 0.01 || ($realtime - t_last_if) - 8.0 * TCLK < -0.01) begin
        failures++; $display("F_IF period %f", $realtime - t_last_if);
      end
    end
    t_last_if = $realtime;
  end
  always @(f_if) begin t_edge = $realtime; edges++; end
  always @(posedge pwm_out) begin
    t_rise = $realtime;
    checks++;
    if (t_rise - t_edge > 0.001) begin failures++; $display("pulse not aligned to F_IF edge"); end
  end
  always @(negedge pwm_out) if (rst_n) begin
    real w;
    w = $realtime - t_rise;
    pulses++;
    checks++;
    if (w - code * UNIT > 0.02 || w - code * UNIT < -0.02) begin
      failures++; if (failures < 10) $display("width %f for code %0d (%f)", w, code, code * UNIT);
    end
  end

  initial begin
    int e, ec;
    t_last_if = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 600; k++) begin
      // change env just after an IF rising edge, so the next code is known
      @(posedge f_if);
      #1;
      e = (k < 5) ? 0 : (k < 10) ? 65535 : int'($urandom % 65536);
      env = 16'(e);
      @(posedge f_if);
      #0.01;
      ec = (e + 128) / 256; if (ec > 255) ec = 255;
      checks++;
      if (code != 8'(ec)) begin failures++; $display("code %0d for env %0d", code, e); end
      if (k < 5) begin
        pulses = 0;
        #300;
        checks++;
        if (pulses != 0) begin failures++; $display("pulse with code 0"); end
      end
    end
    checks++;
    if (edges < 1000) begin failures++; $display("F_IF too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
