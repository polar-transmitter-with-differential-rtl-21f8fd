`timescale 1ns / 1ps
// tb_cordic: drives random I/Q points (magnitude up to 1.0) into the
// vectoring CORDIC and compares envelope and phase with sqrt(I^2+Q^2) and
// atan2(Q, I) from the math library: envelope within 12/65536, phase within
// 8 binary-angle units. Also checks the ITER+2 = 18 clock latency.
module tb_cordic;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic signed [15:0] i_in = '0, q_in = '0;
  logic [15:0] amp, phase;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam int LAT = 18;
  real ea [$];
  real ep [$];
  int  tin [$];
  int  cyc = 0;

  cordic dut (.clk, .rst_n, .in_valid, .i_in, .q_in, .out_valid, .amp, .phase);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    real a, p, d;
    int  t;
    a = ea.pop_front(); p = ep.pop_front(); t = tin.pop_front();
    checks++;
    if (cyc - t != LAT) begin failures++; $display("latency %0d", cyc - t); end
    d = real'(amp) - a;
    checks++;
    if (d > 12.0 || d < -12.0) begin failures++; $display("amp %0d expected %f", amp, a); end
    d = real'(phase) - p;
    if (d > 32768.0) d -= 65536.0;
    if (d < -32768.0) d += 65536.0;
    checks++;
    if (d > 8.0 || d < -8.0) begin failures++; $display("phase %0d expected %f", phase, p); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 3000; k++) begin
      real r, th, iv, qv, pa;
      r  = 0.05 + 0.95 * ($urandom % 10000) / 10000.0;
      th = 2.0 * PI * ($urandom % 65536) / 65536.0;
      iv = $floor(r * 32767.0 * $cos(th));
      qv = $floor(r * 32767.0 * $sin(th));
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0 || k < 10;
      i_in <= 16'(int'(iv)); q_in <= 16'(int'(qv));
      #0.1;
      if (in_valid) begin
        pa = $atan2(qv, iv) / (2.0 * PI) * 65536.0;
        if (pa < 0) pa += 65536.0;
        ea.push_back(2.0 * $sqrt(iv * iv + qv * qv));
        ep.push_back(pa);
        tin.push_back(cyc);
      end
    end
    @(posedge clk) in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (ea.size() != 0) begin failures++; $display("%0d outputs missing", ea.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
