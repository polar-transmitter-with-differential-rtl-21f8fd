`timescale 1ns / 1ps
// tb_sl_dsm: checks the second-order 1-bit delta-sigma modulator bit for bit
// against a floating-point model of the loop equations
//   y = (s2 + x >= 0.5); s1 += x - y; s2 += 0.5*s1 - y
// for constant and randomly changing inputs inside 0.25 .. 0.75, and checks
// that the output density tracks a constant input to within 1/512 over 4096
// clocks (the signal transfer function is 1 at DC).
module tb_sl_dsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] din;
  logic dout, dout_n;
  int checks = 0, failures = 0;
  real s1, s2, x, y;
  int  ones;

  sl_dsm #(.IN_W(16)) dut (.clk, .rst_n, .ce(1'b1), .din, .dout, .dout_n);

  always #2.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input bit randomize_in, input int base);
    ones = 0;
    for (int k = 0; k < n; k++) begin
      if (randomize_in) din = 16'(16384 + ($urandom % 32768));
      else din = 16'(base);
      x = real'(din) / 65536.0;
      y = (s2 + x >= 0.5) ? 1.0 : 0.0;
      @(posedge clk); #0.1;
      checks++;
      if (dout != (y > 0.5) || dout_n == dout) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: din=%0d dout=%0b model=%0.0f", k, din, dout, y);
      end
      ones += int'(dout);
      s2 = s2 + 0.5 * s1 - y;
      s1 = s1 + x - y;
    end
  endtask

  initial begin
    din = 16'h8000; s1 = 0.0; s2 = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      int b;
      b = 16384 + t * 8191;
      run(4096, 1'b0, b);
      checks++;
      if ((ones - 4096.0 * b / 65536.0) > 8.0 || (ones - 4096.0 * b / 65536.0) < -8.0) begin
        failures++;
        $display("density %0d ones for input %0d", ones, b);
      end
    end
    run(20000, 1'b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
