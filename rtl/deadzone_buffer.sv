// deadzone_buffer: behavioural model of the power-switch driver buffer.
//
// Not synthesizable. The inverter-chain buffer drives the complementary
// power switch so that the PMOS and NMOS are never on together: on a rising
// pwm the NMOS turns off at once and the PMOS turns on DZ_NS later; on a
// falling pwm the reverse. Pulses shorter than the dead zone turn neither
// device on. gate_p is the PMOS gate (low = on), gate_n the NMOS gate
// (high = on). DZ_NS = 0.3 ns as in the transmitter description.
`timescale 1ns / 1ps
module deadzone_buffer #(
  parameter real DZ_NS = 0.3
) (
  input  logic pwm,
  output logic gate_p,
  output logic gate_n
);
  logic        p_on, n_on;
  int unsigned gen;
  initial begin p_on = 1'b0; n_on = 1'b0; gen = 0; end
  // any edge turns both devices off at once; the device matching the new
  // level turns on only if pwm has then held that level for DZ_NS
  always @(pwm) begin
    automatic int unsigned mine;
    gen++;
    mine = gen;
    p_on = 1'b0;
    n_on = 1'b0;
    fork
      begin
        #(DZ_NS);
        if (gen == mine) begin
          if (pwm) p_on = 1'b1;
          else     n_on = 1'b1;
        end
      end
    join_none
  end
  assign gate_p = ~p_on;
  assign gate_n = n_on;
endmodule
