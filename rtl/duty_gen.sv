`timescale 1ns / 1ps
// duty_gen: quasi-continuous control clock of the FLL.
//
// In the low-power mode the loop calibrates only in a 10% slot of every
// 0.5 ms control period (2 kHz): with the 1 MHz reference as clock, div_en is
// high for ACTIVE = 50 of PERIOD = 500 reference cycles and gates the
// feedback divider; between slots the integral counter, and so V_CAL and
// S4~0, hold. fd_arm is div_en minus its last cycle, so the frequency
// detector sees the slot end while its clock still runs and drops the
// partial count. With quasi_en low both stay high (continuous operation).
// Period, active time and 1 MHz clock follow the transmitter description;
// the counter, the arm signal and slot_start are this design's.
module duty_gen #(
  parameter int unsigned PERIOD = 500,
  parameter int unsigned ACTIVE = 50
) (
  input  logic clk_ref,
  input  logic rst_n,
  input  logic quasi_en,
  output logic div_en,
  output logic fd_arm,
  output logic slot_start
);
  localparam int unsigned CW = $clog2(PERIOD);
  logic [CW-1:0] cnt;
  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; div_en <= 1'b0; fd_arm <= 1'b0; slot_start <= 1'b0;
    end else begin
      cnt        <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      div_en     <= !quasi_en || (cnt < CW'(ACTIVE));
      fd_arm     <= !quasi_en || (cnt < CW'(ACTIVE - 1));
      slot_start <= quasi_en && (cnt == '0);
    end
  end
endmodule
