`timescale 1ns / 1ps
// tb_tuning_comp: runs the tuning-curve compensation against a model VCO
// curve with a cubic distortion, f(V) = K*V*(1 + 30*V^2) (V in DSM full-scale
// units, f in measurement counts), answering each frequency request after a
// random delay.
//  * mode "1": the nine voltage offsets 0.5 + (i-4)/64 must be applied in
//    order, each held for SETTLE clocks before its request; the stored gains
//    must equal (f8-f0)*(i-4)/(8*(f_i-f4)) in Q2.14 (within 1 LSB), the
//    centre the mean of its neighbours.
//  * mode "2": dsm_in must equal clamp(0.5 + V*gain(nearest point)), one
//    clock after vin_valid, and the compensated curve must be more linear
//    than the raw one (at the table points the error must drop by 4x).
module tb_tuning_comp;
  localparam int SETTLE = 40;
  localparam real K = 200000.0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic meas_start = 1'b0, meas_busy, vin_valid = 1'b0, freq_req, freq_valid = 1'b0;
  logic signed [15:0] vin = '0;
  logic [15:0] dsm_in;
  logic signed [23:0] freq_val = '0;
  logic [15:0] gain_mon [9];
  int checks = 0, failures = 0;
  int fmeas [9];
  int nreq, hold;
  logic [15:0] last_dsm;

  tuning_comp #(.N_PTS(9), .VSTEP_SH(10), .SETTLE(SETTLE)) dut (
    .clk, .rst_n, .meas_start, .meas_busy, .vin_valid, .vin, .dsm_in,
    .freq_req, .freq_valid, .freq_val, .gain_mon);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fcurve(input real v);
    return K * v * (1.0 + 30.0 * v * v);
  endfunction

  function automatic real rabs(input real a);
    return a < 0.0 ? -a : a;
  endfunction

  // frequency meter model
  always @(posedge clk) begin
    if (dsm_in != last_dsm) hold = 0; else hold++;
    last_dsm <= dsm_in;
    if (freq_req && rst_n) begin
      real v;
      v = (real'(dsm_in) - 32768.0) / 65536.0;
      checks += 2;
      if (dsm_in != 16'(32768 + (nreq - 4) * 1024)) begin failures++; $display("offset %0d applied %0d", nreq, dsm_in); end
      if (hold < SETTLE) begin failures++; $display("request after %0d clocks", hold); end
      fmeas[nreq] = int'($floor(fcurve(v) + 0.5));
      nreq++;
      fork begin
        automatic int fv = fmeas[nreq - 1];
        repeat (5 + $urandom % 50) @(posedge clk);
        freq_val <= 24'(fv); freq_valid <= 1'b1;
        @(posedge clk) freq_valid <= 1'b0;
      end join_none
    end
  end

  initial begin
    real g [9];
    real span, e_raw, e_cmp;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // before calibration: unity gains, plain offset
    @(posedge clk) begin vin_valid <= 1'b1; vin <= 16'sd3000; end
    @(posedge clk) vin_valid <= 1'b0;
    #0.1;
    checks++;
    if (dsm_in != 16'd35768) begin failures++; $display("uncalibrated dsm_in %0d", dsm_in); end
    nreq = 0;
    @(posedge clk) meas_start <= 1'b1;
    @(posedge clk) meas_start <= 1'b0;
    wait (meas_busy);
    wait (!meas_busy);
    @(posedge clk); #0.1;
    checks++;
    if (nreq != 9) begin failures++; $display("%0d requests", nreq); end
    span = real'(fmeas[8] - fmeas[0]);
    for (int i = 0; i < 9; i++) begin
      if (i != 4) begin
        g[i] = $floor(span * (i - 4) * 16384.0 / (8.0 * real'(fmeas[i] - fmeas[4])));
        checks++;
        if (real'(gain_mon[i]) - g[i] > 1.0 || real'(gain_mon[i]) - g[i] < -1.0) begin
          failures++; $display("gain %0d = %0d expected %f", i, gain_mon[i], g[i]);
        end
      end
    end
    checks++;
    if (gain_mon[4] != 16'((int'(gain_mon[3]) + int'(gain_mon[5])) / 2)) begin failures++; $display("centre gain"); end
    // mode 2
    e_raw = 0; e_cmp = 0;
    for (int k = 0; k < 3000; k++) begin
      int v, idx, ex;
      v = (k < 9) ? (k - 4) * 1024 : int'($urandom % 12000) - 6000;
      @(posedge clk) begin vin_valid <= 1'b1; vin <= 16'(v); end
      @(posedge clk) vin_valid <= 1'b0;
      #0.1;
      idx = (v + 4096 + 512) >>> 10;
      if (idx < 0) idx = 0;
      if (idx > 8) idx = 8;
      ex = 32768 + ((v * int'(gain_mon[idx])) >>> 14);
      if (ex > 49152) ex = 49152;
      if (ex < 16384) ex = 16384;
      checks++;
      if (dsm_in != 16'(ex)) begin failures++; $display("v=%0d dsm_in=%0d expected %0d", v, dsm_in, ex); end
      if (k < 9 && k != 4) begin
        real ideal;
        ideal = span / 8.0 * (k - 4);
        e_raw += rabs(fcurve(v / 65536.0) - ideal);
        e_cmp += rabs(fcurve((real'(dsm_in) - 32768.0) / 65536.0) - ideal);
      end
    end
    $display("curve error at table points: raw %f, compensated %f", e_raw, e_cmp);
    checks++;
    if (e_cmp * 4.0 > e_raw) begin failures++; $display("compensation ineffective"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
