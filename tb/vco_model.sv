`timescale 1ns / 1ps
// vco_model: behavioural stand-in for the LC VCO and its analog tuning
// filters, for simulation only.
//   f = F0 + KS*(S - 16) + KCAL*(vcal - 0.5) + KMOD*(m + NL*m^3)   [MHz]
// vcal is the delta-sigma DAC stream vcal_p low-pass filtered with time
// constant TAU_CAL; m = (filtered vmod_p) - 0.5 is the modulation voltage
// after the RC filter, modelled as two real poles of time constant TAU_MOD
// each (102.4 ns: -3 dB at 1 MHz overall). fmod_mhz is the modulation part
// of the frequency alone. NL adds a cubic tuning
// distortion for the curve-compensation tests. f_mhz is the instantaneous
// frequency; fc_clk toggles at it.
module vco_model #(
  parameter real F0_MHZ   = 1800.0,
  parameter real KS_MHZ   = 12.0,
  parameter real KCAL_MHZ = 400.0,
  parameter real KMOD_MHZ = 5.0,
  parameter real NL       = 0.0,
  parameter real TAU_CAL  = 500.0,
  parameter real TAU_MOD  = 102.4
) (
  input  logic [4:0] s_word,
  input  logic       vcal_p,
  input  logic       vmod_p,
  output logic       fc_clk,
  output real        f_mhz,
  output real        vmod_m,
  output real        fmod_mhz
);
  real vc, vm, vm1, half;
  // exact running integral of vmod_p over time, so the filter sees the true
  // pulse widths of the 1-bit stream and not samples on the carrier grid
  real integ = 0.0, t_ch = 0.0, integ_step = 0.0, integ_now, avg;
  logic v_last = 1'b0;
  always @(vmod_p) begin
    if (v_last) integ += $realtime - t_ch;
    t_ch = $realtime;
    v_last = vmod_p;
  end
  initial begin
    vc = 0.5; vm = 0.5; vm1 = 0.5; fmod_mhz = 0.0; fc_clk = 1'b0; f_mhz = F0_MHZ; vmod_m = 0.0;
    forever begin
      vmod_m = vm - 0.5;
      fmod_mhz = KMOD_MHZ * (vmod_m + NL * vmod_m * vmod_m * vmod_m);
      f_mhz = F0_MHZ + KS_MHZ * (real'(s_word) - 16.0) + KCAL_MHZ * (vc - 0.5) + fmod_mhz;
      half = 500.0 / f_mhz;
      #(half);
      fc_clk = ~fc_clk;
      vc += (real'(vcal_p) - vc) * half / TAU_CAL;
      integ_now = integ + (v_last ? $realtime - t_ch : 0.0);
      avg = (integ_now - integ_step) / half;
      integ_step = integ_now;
      vm1 += (avg - vm1) * half / TAU_MOD;
      vm  += (vm1 - vm) * half / TAU_MOD;
    end
  end
endmodule
