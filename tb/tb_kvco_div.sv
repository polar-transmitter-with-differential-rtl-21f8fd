`timescale 1ns / 1ps
// tb_kvco_div: checks the 1/(2 K_VCO) scaler: vin = round(fin_d*recip/2^16)
// with saturation to 16 bits, one clock after fin_valid. The reference is
// computed in floating point. Includes the nominal point: recip 7310 and the
// D of a 340 kHz tone (41135) must give about 0.07 of DSM full scale.
module tb_kvco_div;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_valid = 1'b0, vin_valid;
  logic signed [19:0] fin_d = '0;
  logic [15:0] kvco_recip = '0;
  logic signed [15:0] vin;
  int checks = 0, failures = 0;

  kvco_div dut (.clk, .rst_n, .fin_valid, .fin_d, .kvco_recip, .vin_valid, .vin);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int d, input int r);
    real e;
    int  ei;
    @(posedge clk);
    fin_valid <= 1'b1; fin_d <= 20'(d); kvco_recip <= 16'(r);
    @(posedge clk);
    fin_valid <= 1'b0;
    #0.1;
    e  = $floor(real'(d) * real'(r) / 65536.0 + 0.5);
    ei = e > 32767.0 ? 32767 : e < -32768.0 ? -32768 : int'(e);
    checks++;
    if (!vin_valid || vin != 16'(ei)) begin
      failures++; $display("d=%0d r=%0d vin=%0d expected %0d", d, r, vin, ei);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    one(41135, 7310);
    checks++;
    if (vin < 4500 || vin > 4700) begin failures++; $display("nominal scale wrong: %0d", vin); end
    one(-41135, 7310);
    one(524287, 65535);
    one(-524288, 65535);
    for (int k = 0; k < 5000; k++)
      one(int'($urandom % 1048576) - 524288, int'($urandom % 65536));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
