`timescale 1ns / 1ps
// phase_diff: five-point phase-to-frequency differentiator.
//
// The VCO integrates frequency into phase, so the phase path is fed with the
// time derivative of the CORDIC phase. The derivative uses the five-point
// central difference
//   f_in,k = fs/(24*pi) * (phi[k-2] - 8 phi[k-1] + 8 phi[k+1] - phi[k+2])
// with fs = 6.5 MHz. Phase arrives as a 16-bit binary angle, so the sum is
// formed from two wrapped differences, D = 8*(p[k+1]-p[k-1]) - (p[k+2]-p[k-2]),
// which stay correct across the +/-pi wrap as long as the phase moves less
// than pi in four samples. With phi = 2*pi*p/2^16:
//   f_in = fs * D / (12 * 2^16)   [Hz]
// The constant 1/12 is folded into the following 1/(2 K_VCO) scaler, so
// fin_d carries D itself.
//
// Interface: in_valid/phase_in at the 6.5 MHz rate; fin_valid/fin_d follow
// one clock after the sample p[k+2] arrives (the estimate is for the sample two
// steps earlier). The formula follows the transmitter description; the
// integer form, D output scaling and reset state are this design's.
module phase_diff
  import polar_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PH_W-1:0]         phase_in,
  output logic                    fin_valid,
  output logic signed [FIN_W-1:0] fin_d
);
  logic [PH_W-1:0] p1, p2, p3, p4;   // p1 = newest stored
  logic signed [PH_W-1:0] d1, d2;

  // phase_in = p[k+2], p1 = p[k+1], p2 = p[k], p3 = p[k-1], p4 = p[k-2]
  assign d1 = $signed(p1 - p3);        // p[k+1] - p[k-1], wrapped
  assign d2 = $signed(phase_in - p4);  // p[k+2] - p[k-2], wrapped

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; p2 <= '0; p3 <= '0; p4 <= '0;
      fin_valid <= 1'b0; fin_d <= '0;
    end else begin
      fin_valid <= in_valid;
      if (in_valid) begin
        p1 <= phase_in; p2 <= p1; p3 <= p2; p4 <= p3;
        fin_d <= (FIN_W'(d1) <<< 3) - FIN_W'(d2);
      end
    end
  end
endmodule
