`timescale 1ns / 1ps
// cal_dac: digital part of the FLL's 8-bit delta-sigma DAC.
//
// The 8-bit integral count is brought into the 40 MHz DAC clock domain (Gray
// code, two flops) and mapped onto the stable input range of the second-order
// single-loop modulator, x = 0.25 + code/512 (0.25 .. 0.748). The 1-bit
// differential stream vcal_p/vcal_n then goes to the off-chip-style RC low
// pass (100 Hz corner) and isolation buffer, which produce V_CAL.
// The 8-bit resolution, 40 MHz rate and the reuse of the SL-DSM follow the
// transmitter description; the code mapping is this design's choice.
module cal_dac (
  input  logic       clk_src,   // domain of code (f_CLK)
  input  logic       clk_dac,   // 40 MHz
  input  logic       rst_n,
  input  logic [7:0] code,
  output logic [7:0] code_dac,  // code as seen in the DAC domain
  output logic       vcal_p,
  output logic       vcal_n
);
  logic [15:0] x;
  gray_sync #(.W(8)) u_sync (
    .src_clk(clk_src), .dst_clk(clk_dac), .rst_n,
    .src_bin(code), .rst_val(8'd128), .dst_bin(code_dac));
  assign x = 16'h4000 + {1'b0, code_dac, 7'b0};
  sl_dsm #(.IN_W(16)) u_dsm (
    .clk(clk_dac), .rst_n, .ce(1'b1), .din(x), .dout(vcal_p), .dout_n(vcal_n));
endmodule
