`timescale 1ns / 1ps
// kvco_div: divide-by-2*K_VCO scaler of the phase path.
//
// The VCO turns a tuning voltage into frequency with gain K_VCO, and the
// differential tuning splits the voltage over two varactors, so the
// frequency word f_in is divided by 2*K_VCO to give the modulation voltage
// V_in. Here the division is a multiplication by a programmable reciprocal:
//   vin = sat16( fin_d * kvco_recip / 2^16 )
// vin is in DSM input units (2^16 = full DSM scale, so +/-0.07 full scale for
// the +/-340 kHz of 8PSK). kvco_recip also absorbs the fs/(12*2^16) factor of
// the differentiator output; for fs = 6.5 MHz, K_VCO = 5 MHz/V and a 0.5 V
// full scale, kvco_recip = 7310.
//
// Interface: fin_valid/fin_d in, vin_valid/vin out one clock later.
// The run-time reciprocal and the saturation are choices of this design.
module kvco_div
  import polar_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fin_valid,
  input  logic signed [FIN_W-1:0] fin_d,
  input  logic [15:0]             kvco_recip,
  output logic                    vin_valid,
  output logic signed [15:0]      vin
);
  logic signed [FIN_W+17:0] prod;
  logic signed [FIN_W+1:0]  q;
  assign prod = (FIN_W+18)'(fin_d) * (FIN_W+18)'($signed({2'b00, kvco_recip}));
  assign q    = (FIN_W+2)'((prod + (FIN_W+18)'(1 << 15)) >>> 16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vin_valid <= 1'b0; vin <= '0;
    end else begin
      vin_valid <= fin_valid;
      if (fin_valid) begin
        if (q > (FIN_W+2)'(32767))       vin <= 16'sd32767;
        else if (q < -(FIN_W+2)'(32768)) vin <= -16'sd32768;
        else                             vin <= 16'(q);
      end
    end
  end
endmodule
