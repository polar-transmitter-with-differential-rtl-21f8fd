`timescale 1ns / 1ps
// sl_dsm: second-order, 1-bit, single-loop delta-sigma modulator.
//
// Structure (loop of two delaying integrators with a 0.5 inter-stage gain,
// the quantizer output fed back to both integrator inputs, and the input fed
// forward to the quantizer): 
//   s1[n+1] = s1[n] + x[n] - y[n]
//   s2[n+1] = s2[n] + 0.5*s1[n] - y[n]
//   y[n]    = (s2[n] + x[n] >= 0.5)
// which gives STF = (1 - 2z^-1 + 1.5z^-2)/(1 - z^-1 + 0.5z^-2) and
// NTF = (1 - z^-1)^2/(1 - z^-1 + 0.5z^-2), the 2nd-order Butterworth-
// denominator noise shaping of the phase path. The input is an unsigned
// fraction x = din/2^IN_W; y is 0 or 1, and the mean of y equals x. The
// input must stay in 0.25 .. 0.75 for the loop to stay bounded. The second
// integrator is kept at twice its value so the 0.5 gain is exact.
//
// Interface: din is sampled every clock (ce high); dout is the registered bit,
// dout_n its complement (the differential pair to the RC filter). One clock
// of latency from din to dout. Used at 200 MHz in the phase path and at 40 MHz
// in the FLL DAC. Input width and reset to zero state are choices of this
// design.
module sl_dsm #(
  parameter int unsigned IN_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic [IN_W-1:0] din,
  output logic            dout,
  output logic            dout_n
);
  localparam int unsigned SW = IN_W + 6;
  localparam logic signed [SW-1:0] ONE  = SW'(1) <<< IN_W;
  localparam logic signed [SW-1:0] HALF = SW'(1) <<< (IN_W - 1);

  logic signed [SW-1:0] s1, s2x2, x, u2, yv;
  logic                 y;

  assign x  = SW'($unsigned(din));
  assign u2 = s2x2 + (x <<< 1);          // 2*(s2 + x)
  assign y  = (u2 >= (HALF <<< 1));      // compare with 2*0.5
  assign yv = y ? ONE : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= '0;
      s2x2   <= '0;
      dout   <= 1'b0;
    end else if (ce) begin
      s1     <= s1 + x - yv;
      s2x2   <= s2x2 + s1 - (yv <<< 1);
      dout   <= y;
    end
  end
  assign dout_n = ~dout;
endmodule
