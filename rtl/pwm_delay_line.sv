// pwm_delay_line: behavioural model of the PWM's inverter delay line.
//
// Not synthesizable: a chain of L-1 delay cells, each adding UNIT_NS to the
// IF clock, standing for the inverter cells of the real design, whose unit
// delay is held at 1/(2 L f_IF) = 0.601 ns by an auto-calibration loop that
// this model does not contain. taps[k] is f_if delayed by k units.
// Delays use a 1 ns time unit.
`timescale 1ns / 1ps
module pwm_delay_line #(
  parameter int unsigned L       = 256,
  parameter real         UNIT_NS = 0.601
) (
  input  logic         f_if,
  output logic [L-1:1] taps
);
  logic [L-1:0] c;
  assign c[0] = f_if;
  for (genvar k = 1; k < L; k++) begin : g_cell
    initial c[k] = 1'b0;
    always @(c[k-1]) c[k] <= #(UNIT_NS) c[k-1];
  end
  assign taps = c[L-1:1];
endmodule
