`timescale 1ns / 1ps
// polar_pkg: constants shared by the polar transmitter blocks.
// Number formats used across the design:
//  * baseband I/Q: signed 16 bit, full scale +/-1.0 (Q1.15)
//  * phase: 16-bit binary angle, 2^16 = 2*pi, wraps naturally
//  * envelope: unsigned 16 bit, 2^16 = 1.0 of the PWM full scale
//  * DSM input: unsigned 16 bit, 2^16 = 1.0, legal range 0.25 .. 0.75
package polar_pkg;
  localparam int unsigned BB_W    = 16;           // I/Q sample width
  localparam int unsigned PH_W    = 16;           // phase width (binary angle)
  localparam int unsigned AMP_W   = 16;           // envelope width
  localparam int unsigned DSM_W   = 16;           // DSM input width
  localparam int unsigned FIN_W   = 20;           // differentiator output width
  localparam logic [DSM_W-1:0] DSM_MID = 16'h8000; // 0.5
  localparam logic [DSM_W-1:0] DSM_MIN = 16'h4000; // 0.25
  localparam logic [DSM_W-1:0] DSM_MAX = 16'hC000; // 0.75
  localparam int unsigned GAIN_FRAC = 14;         // Q2.14 gains and coefficients
  localparam logic [15:0] GAIN_ONE = 16'(1 << GAIN_FRAC);

  // Time-alignment IIR (Q2.14), fs = 26 MHz. Denominator = the RC filter
  // poles: two real poles at 1.554 MHz (-3 dB at 1 MHz), z = exp(-2*pi*f/fs).
  // Numerator = the LC filter poles: 2nd-order Butterworth at 1 MHz, scaled
  // for unity DC gain.
  localparam logic signed [17:0] IIR_A1 = -18'sd22510;
  localparam logic signed [17:0] IIR_A2 =  18'sd7732;
  localparam logic signed [17:0] IIR_B0 =  18'sd32616;
  localparam logic signed [17:0] IIR_B1 = -18'sd54185;
  localparam logic signed [17:0] IIR_B2 =  18'sd23174;

  // FLL calibration modes (Fig. 6): 1 = coarse S4~0, 2 = fine delta-sigma DAC
  typedef enum logic [1:0] {FLL_IDLE = 2'd0, FLL_COARSE = 2'd1, FLL_FINE = 2'd2} fll_mode_e;
endpackage
