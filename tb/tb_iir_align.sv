`timescale 1ns / 1ps
// tb_iir_align: checks the 2nd-order alignment IIR.
//  * every output sample against a double-precision direct-form model with
//    the same Q2.14 coefficients (within 3 LSB, clamping included);
//  * the alignment property: the filter output passed through a model of the
//    LC filter poles (1 + n1 z^-1 + n2 z^-2, Butterworth at 1 MHz, unity DC
//    gain) must match the input passed through the RC filter poles
//    (1 + a1 z^-1 + a2 z^-2) to within 0.3% of full scale, on random
//    band-limited envelopes;
//  * a new numerator loaded at run time takes effect (pure gain 0.5 check).
module tb_iir_align;
  import polar_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [15:0] x = '0, y;
  logic signed [17:0] b0 = IIR_B0, b1 = IIR_B1, b2 = IIR_B2;
  int checks = 0, failures = 0;
  real mx1, mx2, my1, my2;            // reference IIR state
  real lc1, lc2, rc1, rc2;            // path models
  real a1, a2, n1, n2, gl, gr;

  iir_align dut (.clk, .rst_n, .ce, .x, .b0, .b1, .b2, .y);
  always #19.23 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xv, acc, ym, yc, lcv, rcv, tgt, fc;
    a1 = real'(IIR_A1) / 16384.0; a2 = real'(IIR_A2) / 16384.0;
    n1 = -1.661213; n2 = 0.710505;     // LC poles (1 MHz Butterworth at 26 MHz)
    gl = 1.0 + n1 + n2; gr = 1.0 + a1 + a2;
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0; lc1 = 0; lc2 = 0; rc1 = 0; rc2 = 0;
    tgt = 30000; fc = 30000;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 20000; k++) begin
      if (k % 24 == 0) tgt = 8000 + ($urandom % 40000);
      fc = fc + (tgt - fc) * 0.08;      // smooth, envelope-like input
      @(posedge clk);
      ce <= 1'b1; x <= 16'(int'(fc));
      #0.1;
      xv = real'(x);
      @(posedge clk);
      ce <= 1'b0;
      #0.1;
      acc = real'(b0) * xv + real'(b1) * mx1 + real'(b2) * mx2 - real'(IIR_A1) * my1 - real'(IIR_A2) * my2;
      ym = $floor(acc / 16384.0 + 0.5);
      mx2 = mx1; mx1 = xv; my2 = my1; my1 = ym;
      yc = ym < 0 ? 0 : ym > 65535 ? 65535 : ym;
      checks++;
      if ((real'(y) - yc) > 3.0 || (real'(y) - yc) < -3.0) begin
        failures++; if (failures < 10) $display("k=%0d y=%0d expected %f", k, y, yc);
      end
      // path models: LC on the filtered envelope, RC on the raw envelope
      lcv = gl * real'(y) - n1 * lc1 - n2 * lc2; lc2 = lc1; lc1 = lcv;
      rcv = gr * xv - a1 * rc1 - a2 * rc2;       rc2 = rc1; rc1 = rcv;
      if (k > 200) begin
        checks++;
        if ((lcv - rcv) > 200.0 || (lcv - rcv) < -200.0) begin
          failures++; if (failures < 10) $display("k=%0d LC path %f RC path %f", k, lcv, rcv);
        end
      end
    end
    // numerator reload: b = (0.5, 0, 0) with the fixed poles gives y = 0.5x/(1+a1+a2) at DC
    b0 <= 18'sd8192; b1 <= '0; b2 <= '0;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk); ce <= 1'b1; x <= 16'd1000;
    end
    @(posedge clk); ce <= 1'b0; #0.1;
    checks++;
    if ((real'(y) - 500.0 / gr) > 20.0 || (real'(y) - 500.0 / gr) < -20.0) begin
      failures++; $display("reloaded numerator: y=%0d expected %f", y, 500.0 / gr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
