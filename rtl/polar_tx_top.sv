`timescale 1ns / 1ps
// polar_tx_top: digital polar transmitter for EDGE 8PSK.
//
// A complex 8PSK baseband is split into envelope and phase, which travel
// down two separate paths and meet again in the switched-mode PA (off chip):
//  * baseband (clk_bb = 26 MHz, samples at 6.5 MHz = clk_bb/4): iq_gen makes
//    I/Q from a LUT, cordic converts it to envelope A and phase phi.
//  * phase path: phase_diff differentiates phi into f_in (Eq. five-point),
//    kvco_div scales it by 1/(2 K_VCO), tuning_comp corrects the VCO curve and
//    offsets it to the DSM mid-scale; the 200 MHz sl_dsm produces the 1-bit
//    differential stream vmod_p/vmod_n for the RC filter that sets V_MOD.
//  * envelope path: iir_align (26 MHz) pre-distorts A so the LC-filtered
//    envelope lines up with the RC-filtered phase, pwm_mod with the
//    pwm_delay_line model turns it into 256-level pulse widths of the 3.25 MHz
//    IF clock, and the deadzone_buffer model drives the power switch gates.
//  * carrier calibration: fll divides the VCO output by 32, compares it with
//    N_CAL x 1 MHz and sets S4~0 (coarse) and the V_CAL DAC stream (fine),
//    optionally duty-cycled at 2 kHz / 10%. It also measures the VCO frequency
//    for the tuning-curve compensation's mode "1".
// The VCO, RC and LC filters, power switch and PA are analog; their signals
// are ports. Clock-domain crossings use toggle and Gray synchronisers.
// The two delay-based models make this top a simulation top; all other logic
// is synthesizable. Block partitioning and rates follow the transmitter
// description; clocking of the crossings and control ports are this design's.
module polar_tx_top
  import polar_pkg::*;
#(
  parameter int unsigned SPS       = 24,
  parameter int unsigned L         = 256,
  parameter int unsigned PERIOD    = 500,
  parameter int unsigned ACTIVE    = 50,
  parameter int unsigned MEAS_REFS = 8192,
  parameter int unsigned SETTLE    = 256
) (
  input  logic               clk_bb,
  input  logic               clk_dsm,
  input  logic               clk_ref,
  input  logic               clk_dac,
  input  logic               fc_clk,
  input  logic               rst_n,
  // baseband data
  input  logic [2:0]         sym,
  output logic               sym_take,
  // configuration
  input  logic [15:0]        kvco_recip,
  input  logic signed [17:0] iir_b0,
  input  logic signed [17:0] iir_b1,
  input  logic signed [17:0] iir_b2,
  input  logic [6:0]         n_cal,
  input  logic               quasi_en,
  input  logic               fll_recal,       // clk_bb pulse
  input  logic               curve_meas,      // clk_bb pulse: tuning-curve mode "1"
  // to the analog parts
  output logic               vmod_p,
  output logic               vmod_n,
  output logic               vcal_p,
  output logic               vcal_n,
  output logic [4:0]         s_word,
  output logic               f_if,
  output logic               pwm_out,
  output logic               gate_p,
  output logic               gate_n,
  // monitors
  output logic               curve_busy,
  output fll_mode_e          fll_mode,
  output logic               fll_div_en,
  output logic [$clog2(L)-1:0] env_code,
  output logic [DSM_W-1:0]   dsm_in_mon,
  output logic [15:0]        curve_gain [9]
);
  // ---- 6.5 MHz sample strobe ---------------------------------------------
  logic [1:0] ph;
  logic       ce65;
  always_ff @(posedge clk_bb or negedge rst_n)
    if (!rst_n) ph <= '0; else ph <= ph + 1'b1;
  assign ce65 = (ph == 2'd3);

  // ---- baseband ------------------------------------------------------------
  logic                   iq_valid, pol_valid;
  logic signed [BB_W-1:0] i_s, q_s;
  logic [AMP_W-1:0]       amp, amp_h, env;
  logic [PH_W-1:0]        phi;

  iq_gen #(.SPS(SPS)) u_iq (
    .clk(clk_bb), .rst_n, .ce(ce65), .sym, .sym_take,
    .out_valid(iq_valid), .i_out(i_s), .q_out(q_s));

  cordic u_cordic (
    .clk(clk_bb), .rst_n, .in_valid(iq_valid), .i_in(i_s), .q_in(q_s),
    .out_valid(pol_valid), .amp, .phase(phi));

  // ---- phase path --------------------------------------------------------
  logic                    fin_valid, vin_valid;
  logic signed [FIN_W-1:0] fin_d;
  logic signed [15:0]      vin;
  logic [DSM_W-1:0]        dsm_in, dsm_in_f;
  logic                    freq_req, freq_valid, upd_bb, upd_f;
  logic signed [23:0]      meas_val;
  logic                    meas_req_f, meas_done_f, recal_f, f_clk;

  phase_diff u_diff (
    .clk(clk_bb), .rst_n, .in_valid(pol_valid), .phase_in(phi),
    .fin_valid, .fin_d);

  kvco_div u_kvco (
    .clk(clk_bb), .rst_n, .fin_valid, .fin_d, .kvco_recip,
    .vin_valid, .vin);

  tuning_comp #(.SETTLE(SETTLE)) u_comp (
    .clk(clk_bb), .rst_n, .meas_start(curve_meas), .meas_busy(curve_busy),
    .vin_valid, .vin, .dsm_in, .freq_req, .freq_valid, .freq_val(meas_val),
    .gain_mon(curve_gain));

  // DSM input crosses to 200 MHz once per 6.5 MHz sample
  always_ff @(posedge clk_bb or negedge rst_n)
    if (!rst_n) upd_bb <= 1'b0; else upd_bb <= ce65;
  pulse_sync u_upd (.src_clk(clk_bb), .dst_clk(clk_dsm), .rst_n,
                    .src_pulse(upd_bb), .dst_pulse(upd_f));
  always_ff @(posedge clk_dsm or negedge rst_n)
    if (!rst_n) dsm_in_f <= DSM_MID; else if (upd_f) dsm_in_f <= dsm_in;

  sl_dsm #(.IN_W(DSM_W)) u_dsm (
    .clk(clk_dsm), .rst_n, .ce(1'b1), .din(dsm_in_f),
    .dout(vmod_p), .dout_n(vmod_n));
  assign dsm_in_mon = dsm_in_f;

  // ---- carrier calibration -----------------------------------------------
  pulse_sync u_mreq (.src_clk(clk_bb), .dst_clk(f_clk), .rst_n,
                     .src_pulse(freq_req), .dst_pulse(meas_req_f));
  pulse_sync u_mdone (.src_clk(f_clk), .dst_clk(clk_bb), .rst_n,
                      .src_pulse(meas_done_f), .dst_pulse(freq_valid));
  pulse_sync u_recal (.src_clk(clk_bb), .dst_clk(f_clk), .rst_n,
                      .src_pulse(fll_recal), .dst_pulse(recal_f));

  logic [7:0] dac_code;
  logic       fd_up, fd_dn;
  fll #(.PERIOD(PERIOD), .ACTIVE(ACTIVE), .MEAS_REFS(MEAS_REFS)) u_fll (
    .fc_clk, .clk_ref, .clk_dac, .rst_n, .n_cal, .quasi_en,
    .recal(recal_f), .meas_hold(curve_busy), .meas_req(meas_req_f),
    .meas_done(meas_done_f), .meas_val, .s_word, .vcal_p, .vcal_n,
    .mode(fll_mode), .dac_code, .f_clk, .div_en(fll_div_en),
    .up(fd_up), .dn(fd_dn));

  // ---- envelope path -----------------------------------------------------
  always_ff @(posedge clk_bb or negedge rst_n)
    if (!rst_n) amp_h <= '0; else if (pol_valid) amp_h <= amp;

  iir_align u_iir (
    .clk(clk_bb), .rst_n, .ce(1'b1), .x(amp_h),
    .b0(iir_b0), .b1(iir_b1), .b2(iir_b2), .y(env));

  logic [L-1:1] taps;
  pwm_mod #(.L(L)) u_pwm (
    .clk(clk_bb), .rst_n, .env, .taps, .f_if, .code(env_code), .pwm_out);

  pwm_delay_line #(.L(L)) u_dline (.f_if, .taps);

  deadzone_buffer u_buf (.pwm(pwm_out), .gate_p, .gate_n);
endmodule
