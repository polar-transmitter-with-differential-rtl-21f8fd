`timescale 1ns / 1ps
// tb_fll: closes the calibration loop around the behavioural VCO model
// (F0 = 1800 MHz, 12 MHz per S step, 400 MHz per unit of DAC output) with
// N_CAL = 55, i.e. a 1760 MHz target. Checks:
//  * coarse mode "1" brackets the target (S = 12 or 13) and hands over to
//    fine mode "2";
//  * in fine mode the average carrier settles within 3 MHz of N_CAL x 32 MHz;
//  * in quasi-continuous operation (control period shortened to 50 reference
//    cycles with 5 active) the divider runs only in its slot, the DAC code
//    never changes outside a slot, and f_C stays locked;
//  * a frequency measurement returns the carrier offset within one count.
module tb_fll;
  import polar_pkg::*;
  logic clk_ref = 1'b0, clk_dac = 1'b0, rst_n = 1'b1, quasi_en = 1'b0;
  logic recal = 1'b0, meas_hold = 1'b0, meas_req = 1'b0, meas_done;
  logic signed [23:0] meas_val;
  logic [4:0] s_word;
  logic vcal_p, vcal_n, fc_clk, f_clk, div_en, up, dn;
  fll_mode_e mode;
  logic [7:0] dac_code;
  real f_mhz, vm, fm;
  int checks = 0, failures = 0;
  int slot_changes, hold_changes, slots;

  fll #(.PERIOD(50), .ACTIVE(5), .MEAS_REFS(64)) dut (
    .fc_clk, .clk_ref, .clk_dac, .rst_n, .n_cal(7'd55), .quasi_en, .recal,
    .meas_hold, .meas_req, .meas_done, .meas_val, .s_word, .vcal_p, .vcal_n,
    .mode, .dac_code, .f_clk, .div_en, .up, .dn);

  vco_model #(.F0_MHZ(1800.0), .KS_MHZ(12.0), .KCAL_MHZ(400.0)) u_vco (
    .s_word, .vcal_p, .vmod_p(1'b0), .fc_clk, .f_mhz, .vmod_m(vm), .fmod_mhz(fm));

  always #500 clk_ref = ~clk_ref;
  always #12.5 clk_dac = ~clk_dac;

  initial begin
    #6000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code must only move while the divider is running
  logic [7:0] code_q;
  always @(posedge clk_ref) begin
    if (rst_n && dac_code != code_q) begin
      if (div_en) slot_changes++; else hold_changes++;
    end
    code_q <= dac_code;
  end
  always @(posedge div_en) slots++;

  task automatic avg_f(input int n, output real r);
    real s;
    s = 0;
    for (int k = 0; k < n; k++) begin #100; s += f_mhz; end
    r = s / n;
  endtask

  initial begin
    real fa;
    #1 rst_n = 1'b0;   // a real edge: the derived clocks do not run during reset
    #3000 rst_n = 1'b1;
    wait (mode == FLL_FINE);
    #1;
    checks++;
    if (s_word != 5'd12 && s_word != 5'd13) begin failures++; $display("coarse S = %0d", s_word); end
    $display("fine mode at %0t ns, S = %0d", $time, s_word);
    #800000;
    avg_f(2000, fa);
    $display("continuous: average f_C %f MHz, code %0d", fa, dac_code);
    checks++;
    if (fa - 1760.0 > 3.0 || fa - 1760.0 < -3.0) begin failures++; $display("not locked"); end
    // frequency measurement
    meas_hold = 1'b1;
    #5000;
    @(posedge f_clk) meas_req <= 1'b1;
    @(posedge f_clk) meas_req <= 1'b0;
    @(posedge meas_done);
    #1;
    avg_f(20, fa);
    checks++;
    if (real'(meas_val) - (fa - 1760.0) * 2.0 > 2.5 || real'(meas_val) - (fa - 1760.0) * 2.0 < -2.5) begin
      failures++; $display("measurement %0d for %f MHz", meas_val, fa);
    end
    meas_hold = 1'b0;
    // quasi-continuous
    quasi_en = 1'b1;
    slot_changes = 0; hold_changes = 0; slots = 0;
    #1000000;
    avg_f(2000, fa);
    $display("quasi-continuous: average f_C %f MHz, %0d slots, %0d code changes in slots", fa, slots, slot_changes);
    checks += 3;
    if (hold_changes != 0) begin failures++; $display("code changed outside slot %0d", hold_changes); end
    if (slots < 15) begin failures++; $display("too few slots %0d", slots); end
    if (fa - 1760.0 > 3.0 || fa - 1760.0 < -3.0) begin failures++; $display("lost lock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
