`timescale 1ns / 1ps
// fll: dual-mode low-power carrier-frequency calibration loop.
//
// The VCO output f_C is divided by 4 and then by 8 to f_CLK; the frequency
// detector compares f_CLK with N_CAL x F_REF once per 1 us reference period
// and steps the 8-bit integral counter up or down. In coarse mode "1" the
// counter's 5 MSBs set the VCO capacitor bank S4~0; in fine mode "2" the
// count feeds the 8-bit delta-sigma DAC whose filtered output is V_CAL. The
// loop settles where f_C = N_CAL x 32 MHz. With quasi_en high the dividers
// and detector run only in a 50 us slot of every 500 us control period and
// the loop holds its state in between (a tenth of the divider power, ten
// times the locking time). Coarse mode and any frequency measurement
// (meas_req) always run continuously.
//
// Clocks: fc_clk (carrier, or a scaled stand-in in simulation), clk_ref
// (F_REF = 1 MHz), clk_dac (40 MHz). f_CLK is generated here and drives the
// detector and counter. Loop structure and rates follow the transmitter
// description; synchronisers and the handling of measurement requests are
// this design's.
module fll
  import polar_pkg::*;
#(
  parameter int unsigned PERIOD    = 500,
  parameter int unsigned ACTIVE    = 50,
  parameter int unsigned MEAS_REFS = 8192
) (
  input  logic               fc_clk,
  input  logic               clk_ref,
  input  logic               clk_dac,
  input  logic               rst_n,
  input  logic [6:0]         n_cal,
  input  logic               quasi_en,
  input  logic               recal,       // f_CLK domain pulse: restart coarse
  input  logic               meas_hold,   // keep the divider on (measurement)
  input  logic               meas_req,    // f_CLK domain pulse
  output logic               meas_done,   // f_CLK domain pulse
  output logic signed [23:0] meas_val,
  output logic [4:0]         s_word,
  output logic               vcal_p,
  output logic               vcal_n,
  output fll_mode_e          mode,
  output logic [7:0]         dac_code,
  output logic               f_clk,
  output logic               div_en,
  output logic               up,
  output logic               dn
);
  logic clk_div4, fd_arm, slot_start, quasi_eff;
  logic [7:0] code_dac;

  assign quasi_eff = quasi_en && (mode == FLL_FINE) && !meas_hold;

  duty_gen #(.PERIOD(PERIOD), .ACTIVE(ACTIVE)) u_duty (
    .clk_ref, .rst_n, .quasi_en(quasi_eff), .div_en, .fd_arm, .slot_start);

  clk_div #(.DIV_LOG2(2)) u_div4 (.clk_in(fc_clk),   .rst_n, .en(div_en), .clk_out(clk_div4));
  clk_div #(.DIV_LOG2(3)) u_div8 (.clk_in(clk_div4), .rst_n, .en(div_en), .clk_out(f_clk));

  freq_detector #(.MEAS_REFS(MEAS_REFS)) u_fd (
    .clk(f_clk), .rst_n, .ref_in(clk_ref), .arm(fd_arm), .n_cal,
    .up, .dn, .meas_req, .meas_done, .meas_val);

  fll_ctrl u_ctrl (
    .clk(f_clk), .rst_n, .recal, .up, .dn, .s_word, .dac_code, .mode);

  cal_dac u_dac (
    .clk_src(f_clk), .clk_dac, .rst_n, .code(dac_code), .code_dac,
    .vcal_p, .vcal_n);
endmodule
