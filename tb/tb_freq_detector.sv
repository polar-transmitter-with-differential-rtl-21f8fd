`timescale 1ns / 1ps
// tb_freq_detector: feeds f_CLK at several frequencies against a 1 MHz
// reference with N_CAL = 56. Below 55 MHz every judged window must give UP,
// above 57 MHz DN, in between (56.02 MHz) mostly neither; one decision per
// reference period, none for the first window after arming and none while
// disarmed. The measurement port must return count - 56*MEAS_REFS within 1.
module tb_freq_detector;
  localparam int MR = 16;
  logic clk = 1'b0, rst_n = 1'b0, ref_in = 1'b0, arm = 1'b0;
  logic up, dn, meas_req = 1'b0, meas_done;
  logic signed [23:0] meas_val;
  int checks = 0, failures = 0;
  real tclk = 1000.0 / 55.3;
  int nup, ndn;

  freq_detector #(.MEAS_REFS(MR)) dut (.clk, .rst_n, .ref_in, .arm, .n_cal(7'd56),
    .up, .dn, .meas_req, .meas_done, .meas_val);
  always #(tclk / 2.0) clk = ~clk;
  always #500 ref_in = ~ref_in;
  always @(posedge clk) begin nup += int'(up); ndn += int'(dn); end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window_test(input real mhz, input int exp_up, input int exp_dn, input int tol);
    tclk = 1000.0 / mhz;
    arm = 1'b0; #3000;
    nup = 0; ndn = 0;
    arm = 1'b1;
    #20200;                       // 20 windows, the first is dropped
    checks++;
    if (nup < exp_up - tol || nup > exp_up + tol || ndn < exp_dn - tol || ndn > exp_dn + tol) begin
      failures++; $display("%f MHz: up=%0d dn=%0d", mhz, nup, ndn);
    end
    checks++;
    if (nup + ndn > 19) begin failures++; $display("too many decisions %0d", nup + ndn); end
  endtask

  task automatic meas_test(input real mhz);
    real e;
    tclk = 1000.0 / mhz;
    #5000;
    @(posedge clk) meas_req <= 1'b1;
    @(posedge clk) meas_req <= 1'b0;
    fork
      @(posedge meas_done);
      #((MR + 4) * 1000);
    join_any
    disable fork;
    #1;
    e = (mhz - 56.0) * MR;
    checks++;
    if (real'(meas_val) - e > 1.5 || real'(meas_val) - e < -1.5) begin
      failures++; $display("meas %f MHz: %0d expected %f", mhz, meas_val, e);
    end
  endtask

  initial begin
    #2000 rst_n = 1'b1;
    window_test(54.3, 19, 0, 1);
    window_test(57.6, 0, 19, 1);
    window_test(56.0 + 0.02, 0, 0, 2);
    window_test(40.0, 19, 0, 1);
    // disarmed: no decisions
    arm = 1'b0; #3000; nup = 0; ndn = 0; #10000;
    checks++;
    if (nup + ndn != 0) begin failures++; $display("decision while disarmed"); end
    arm = 1'b1;
    meas_test(58.0);
    meas_test(53.25);
    meas_test(56.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
