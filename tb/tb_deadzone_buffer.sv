`timescale 1ns / 1ps
// tb_deadzone_buffer: drives random pulse trains (widths 0.1 .. 20 ns) and
// checks the gate drive: the PMOS (gate_p low) and NMOS (gate_n high) are
// never on together, each turns on 0.3 ns after the corresponding pwm edge
// and off at once, and pulses shorter than the dead zone turn on neither.
module tb_deadzone_buffer;
  localparam real DZ = 0.3;
  logic pwm = 1'b0, gate_p, gate_n;
  int checks = 0, failures = 0;
  real t_edge;

  deadzone_buffer #(.DZ_NS(DZ)) dut (.pwm, .gate_p, .gate_n);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(gate_p or gate_n) begin
    checks++;
    if (!gate_p && gate_n) begin failures++; $display("shoot-through at %f", $realtime); end
  end
  always @(negedge gate_p) begin
    checks++;
    if (($realtime - t_edge) - DZ > 0.002 || ($realtime - t_edge) - DZ < -0.002 || !pwm) begin
      failures++; $display("PMOS on %f after edge", $realtime - t_edge);
    end
  end
  always @(posedge gate_n) if ($realtime > 1.0) begin
    checks++;
    if (($realtime - t_edge) - DZ > 0.002 || ($realtime - t_edge) - DZ < -0.002 || pwm) begin
      failures++; $display("NMOS on %f after edge", $realtime - t_edge);
    end
  end

  initial begin
    #10;
    for (int k = 0; k < 4000; k++) begin
      real w;
      w = (k % 10 == 0) ? 0.1 + 0.001 * ($urandom % 150) : 0.5 + 0.01 * ($urandom % 2000);
      pwm = ~pwm; t_edge = $realtime;
      #0.001;
      checks++;
      if (pwm ? gate_n : !gate_p) begin failures++; $display("device not off at edge"); end
      #(w - 0.001);
      if (w < DZ) begin
        checks++;
        if (pwm ? !gate_p : gate_n) begin failures++; $display("short pulse turned device on"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
