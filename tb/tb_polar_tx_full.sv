`timescale 1ns / 1ps
// tb_polar_tx_full: one complete transmit operation of the whole transmitter
// with every top-level parameter at its default, closed around the
// behavioural VCO model. The tuning-curve measurement (9 points of 8192
// reference cycles each, about 74 ms) is left to tb_polar_tx_top, which runs
// it with shorter measurement windows.
//
// The VCO model is linear (no cubic term) so that the phase check measures
// the digital path, and runs at a scaled carrier (N_CAL = 8, i.e. 256 MHz) to keep
// the simulation short; its modulation gain (4.857 MHz per unit of DSM
// input) matches kvco_recip = 7310, so the VCO's frequency deviation equals
// f_in. Sequence and checks:
//  1. reset; the FLL must pass from coarse to fine mode and hold the carrier
//     within 1% of N_CAL x 32 MHz;
//  2. 60 random 8PSK symbols with unity curve gains. Reference model in the
//     bench: the 8PSK/3pi/8 LUT points with linear interpolation, exact
//     atan2 and magnitude. Phase path: the VCO's integrated modulation phase
//     must follow the RC-filtered reference phase (RMS < 4 degrees at the
//     best latency). Envelope path: the PWM duty (code/256) through a model of
//     the 1 MHz Butterworth LC filter must follow the reference envelope
//     through the RC filter poles (RMS < 1.5% of full scale), which is what
//     the alignment IIR is for (the error without the IIR is printed for
//     comparison);
//  4. quasi-continuous FLL for 3 ms: divider slots of 50 us every 500 us, no
//     DAC code change outside a slot, carrier still within 1%;
//  5. 60 more symbols after the quasi-continuous FLL, phase RMS < 4 degrees.
//  6. 20 symbols with a four times larger 1/(2 K_VCO), which must drive the
//     DSM input into its 0.25 / 0.75 clamp.
// Every mechanism (symbol fetch, coarse and fine FLL modes, UP and DN
// decisions, quasi-continuous slots, DSM input clamp,
// PWM pulses, dead-zone gate drive, IIR pre-emphasis) is counted and must
// occur.
module tb_polar_tx_full;
  import polar_pkg::*;
  localparam real TBB = 1000.0 / 26.0;
  localparam real PI = 3.14159265358979;
  localparam int  SPS = 24;
  localparam real AMP = 26214.0;
  localparam int  NS = 60;
  localparam int  NCYC = NS * SPS * 4 + 400;

  logic clk_bb = 1'b0, clk_dsm = 1'b0, clk_ref = 1'b0, clk_dac = 1'b0, rst_n = 1'b1;
  logic [2:0] sym = '0;
  logic sym_take;
  logic quasi_en = 1'b0, fll_recal = 1'b0, curve_meas = 1'b0;
  logic vmod_p, vmod_n, vcal_p, vcal_n, f_if, pwm_out, gate_p, gate_n;
  logic [4:0] s_word;
  logic curve_busy, fll_div_en;
  fll_mode_e fll_mode;
  logic [7:0] env_code;
  logic [15:0] dsm_in_mon;
  logic [15:0] curve_gain [9];
  logic fc_clk;
  logic [15:0] kvco_recip = 16'd7310;
  real f_mhz, vm, fm;
  int checks = 0, failures = 0;

  polar_tx_top dut (
    .clk_bb, .clk_dsm, .clk_ref, .clk_dac, .fc_clk, .rst_n, .sym, .sym_take,
    .kvco_recip, .iir_b0(IIR_B0), .iir_b1(IIR_B1), .iir_b2(IIR_B2),
    .n_cal(7'd8), .quasi_en, .fll_recal, .curve_meas,
    .vmod_p, .vmod_n, .vcal_p, .vcal_n, .s_word, .f_if, .pwm_out, .gate_p, .gate_n,
    .curve_busy, .fll_mode, .fll_div_en, .env_code, .dsm_in_mon, .curve_gain);

  vco_model #(.F0_MHZ(262.0), .KS_MHZ(2.0), .KCAL_MHZ(40.0), .KMOD_MHZ(4.857),
              .NL(0.0), .TAU_CAL(500.0), .TAU_MOD(102.4)) u_vco (
    .s_word, .vcal_p, .vmod_p, .fc_clk, .f_mhz, .vmod_m(vm), .fmod_mhz(fm));

  always #(TBB / 2.0) clk_bb = ~clk_bb;
  always #2.5   clk_dsm = ~clk_dsm;
  always #500   clk_ref = ~clk_ref;
  always #12.5  clk_dac = ~clk_dac;

  initial begin
    #150000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ------------------------------------
  int n_sym, n_coarse, n_fine, n_up, n_dn, n_slots, n_clamp, n_pulse, n_gate, n_boost;
  int hold_changes;
  logic [7:0] code_q;
  always @(posedge clk_bb) if (rst_n) begin
    n_sym   += int'(sym_take);
    n_coarse += int'(fll_mode == FLL_COARSE);
    n_fine   += int'(fll_mode == FLL_FINE);
    n_clamp += int'(dut.u_comp.vin_valid && dut.u_comp.state == 0 &&
                    (dut.u_comp.vout > 20'(DSM_MAX) || dut.u_comp.vout < 20'(DSM_MIN)));
    n_boost += int'(dut.env > dut.amp_h + 16'd512);
  end
  always @(posedge dut.f_clk) begin n_up += int'(dut.fd_up); n_dn += int'(dut.fd_dn); end
  always @(posedge fll_div_en) if (quasi_en) n_slots++;
  always @(posedge pwm_out) n_pulse++;
  always @(negedge gate_p) n_gate++;
  always @(posedge clk_ref) begin
    if (rst_n && quasi_en && !fll_div_en && dut.dac_code != code_q) hold_changes++;
    code_q <= dut.dac_code;
  end

  // ---------------- baseband reference model ------------------------------
  real mi_prev, mq_prev, mi_cur, mq_cur, m_i, m_q, m_ph, m_amp, ph_unwr, ph_last;
  int  m_rot, m_cnt;
  always @(posedge clk_bb) if (rst_n && dut.ce65) begin
    m_i = mi_prev + (mi_cur - mi_prev) * (m_cnt + 1) / SPS;
    m_q = mq_prev + (mq_cur - mq_prev) * (m_cnt + 1) / SPS;
    m_ph = $atan2(m_q, m_i);
    begin
      real d;
      d = m_ph - ph_last;
      while (d > PI) d -= 2.0 * PI;
      while (d < -PI) d += 2.0 * PI;
      ph_unwr += d;
      ph_last = m_ph;
    end
    m_amp = $sqrt(m_i * m_i + m_q * m_q) / 32768.0;
    if (sym_take) begin
      int idx;
      real a;
      idx = (2 * sym + m_rot) % 16;
      a = PI * idx / 8.0;
      mi_prev = mi_cur; mq_prev = mq_cur;
      mi_cur = AMP * $cos(a); mq_cur = AMP * $sin(a);
      m_rot = (m_rot + 3) % 16;
      m_cnt = 0;
    end else m_cnt++;
  end
  always @(posedge clk_bb) if (sym_take) sym <= 3'($urandom);

  // ---------------- path recording ----------------------------------------
  real r_ph [NCYC], r_env [NCYC], r_vph [NCYC], r_lc [NCYC], r_lcraw [NCYC];
  real vph, rc1a, rc1b, rc2a, rc2b, lc1, lc2, lr1, lr2;
  real pr, a1, a2, n1, n2, gl;
  bit  rec;
  int  nrec;
  always @(posedge clk_bb) begin
    real x, y, yr;
    vph += 2.0 * PI * fm * 1.0e-3 * TBB;          // MHz * ns -> cycles*1e-3
    if (rec && nrec < NCYC) begin
      // reference: ideal phase / envelope through the RC poles (2 x 1.554 MHz)
      rc1a = pr * rc1a + (1.0 - pr) * ph_unwr;  rc1b = pr * rc1b + (1.0 - pr) * rc1a;
      rc2a = pr * rc2a + (1.0 - pr) * m_amp;    rc2b = pr * rc2b + (1.0 - pr) * rc2a;
      // measured envelope: PWM duty through the LC filter model
      x = real'(env_code) / 256.0;
      y = gl * x - n1 * lc1 - n2 * lc2; lc2 = lc1; lc1 = y;
      // same LC filter on the raw envelope (no alignment filter), for comparison
      yr = gl * m_amp - n1 * lr1 - n2 * lr2; lr2 = lr1; lr1 = yr;
      r_ph[nrec] = rc1b; r_env[nrec] = rc2b; r_vph[nrec] = vph; r_lc[nrec] = y; r_lcraw[nrec] = yr;
      nrec++;
    end
  end

  task automatic best_fit(input bit phase, input bit raw, output int lag, output real rms);
    rms = 1.0e9; lag = 0;
    for (int l = 0; l < 120; l++) begin
      real s, s2, off, e;
      int  n;
      s = 0; s2 = 0; n = 0;
      for (int t = 600; t < nrec; t++) begin
        e = phase ? (r_vph[t] - r_ph[t - l]) : ((raw ? r_lcraw[t] : r_lc[t]) - r_env[t - l]);
        s += e; s2 += e * e; n++;
      end
      off = phase ? s / n : 0.0;
      e = $sqrt(s2 / n - (phase ? off * off : 0.0));
      if (e < rms) begin rms = e; lag = l; end
    end
  endtask

  task automatic run_symbols(input real ph_tol_deg, input bit env_check);
    int lp, le, lr;
    real ep, ee, er;
    nrec = 0; rec = 1'b1;
    rc1a = ph_unwr; rc1b = ph_unwr; rc2a = m_amp; rc2b = m_amp;
    vph = 0.0;
    wait (nrec == NCYC);
    rec = 1'b0;
    best_fit(1'b1, 1'b0, lp, ep);
    best_fit(1'b0, 1'b0, le, ee);
    best_fit(1'b0, 1'b1, lr, er);
    $display("phase path: RMS error %f deg at latency %0d clk_bb cycles", ep * 180.0 / PI, lp);
    $display("envelope path: RMS error %f of full scale at latency %0d (without alignment filter %f)", ee, le, er);
    checks++;
    if (ep * 180.0 / PI > ph_tol_deg) begin failures++; $display("phase tracking too poor"); end
    if (env_check) begin
      checks++;
      if (ee > 0.015) begin failures++; $display("envelope tracking too poor"); end
    end
  endtask

  task automatic carrier_check(input string what);
    real s;
    s = 0;
    for (int k = 0; k < 2000; k++) begin #50; s += f_mhz; end
    s /= 2000.0;
    $display("%s: average carrier %f MHz (target 256)", what, s);
    checks++;
    if (s > 256.0 * 1.01 || s < 256.0 * 0.99) begin failures++; $display("carrier off"); end
  endtask

  initial begin
    mi_prev = 0; mq_prev = 0; mi_cur = AMP; mq_cur = 0; m_rot = 0; m_cnt = 0;
    ph_unwr = 0; ph_last = 0; m_amp = 0; rec = 1'b0; nrec = 0; vph = 0;
    lc1 = 0; lc2 = 0; lr1 = 0; lr2 = 0;
    pr = $exp(-2.0 * PI * 1.554e6 / 26.0e6);
    n1 = -1.661213; n2 = 0.710505; gl = 1.0 + n1 + n2;
    a1 = -2.0 * pr; a2 = pr * pr;
    n_sym = 0; n_coarse = 0; n_fine = 0; n_up = 0; n_dn = 0; n_slots = 0;
    n_clamp = 0; n_pulse = 0; n_gate = 0; n_boost = 0; hold_changes = 0;
    #1 rst_n = 1'b0;
    #3000 rst_n = 1'b1;
    // 1. carrier calibration
    wait (fll_mode == FLL_FINE);
    $display("FLL fine mode at %0t, S = %0d", $realtime, s_word);
    #400000;
    carrier_check("continuous FLL");
    // 2. symbols, unity curve gains
    run_symbols(4.0, 1'b1);
    // 4. quasi-continuous FLL
    quasi_en = 1'b1;
    #3000000;
    carrier_check("quasi-continuous FLL");
    checks++;
    if (hold_changes != 0) begin failures++; $display("DAC code moved outside slot"); end
    // 5. more symbols
    run_symbols(4.0, 1'b1);
    // 6. overdrive: a four times larger 1/(2K_VCO) must hit the DSM input clamp
    kvco_recip = 16'd29240;
    repeat (20 * SPS * 4) @(posedge clk_bb);
    kvco_recip = 16'd7310;
    $display("mechanisms: symbols %0d coarse %0d fine %0d up %0d dn %0d slots %0d clamp %0d pulses %0d gate %0d boost %0d",
             n_sym, n_coarse, n_fine, n_up, n_dn, n_slots, n_clamp, n_pulse, n_gate, n_boost);
    checks += 10;
    if (n_sym < 2 * NS) failures++;
    if (n_coarse == 0) failures++;
    if (n_fine == 0) failures++;
    if (n_up == 0) failures++;
    if (n_dn == 0) failures++;
    if (n_slots < 5) failures++;
    if (n_clamp == 0) failures++;
    if (n_pulse == 0) failures++;
    if (n_gate == 0) failures++;
    if (n_boost == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
