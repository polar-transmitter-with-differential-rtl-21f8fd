`timescale 1ns / 1ps
// iir_align: second-order IIR time-alignment filter of the envelope path.
//
// The phase path is shaped by its RC filter, the envelope path by its LC
// filter. This filter, placed in the envelope path, cancels the LC poles with
// its zeros and imposes the RC poles with its own poles, so both paths end up
// with the same transfer function and the envelope and phase stay aligned:
//   H(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1 z^-1 + a2 z^-2)
// The numerator is programmable at run time (b0..b2) so the zeros can follow
// the process/voltage/temperature drift of the LC filter; the denominator is
// fixed (parameters A1, A2), which keeps the filter stable, while the RC
// filter is trimmed to hold its poles. Direct form I, Q2.14 coefficients,
// full-precision feedback state, output rounded and clamped to 0 .. 65535.
//
// Interface: ce marks a 26 MHz sample; x (unsigned envelope, 2^16 = 1.0) in,
// y registered on the same ce (one sample latency). The filter order, clock
// and fixed-pole/programmable-zero split follow the transmitter description;
// the coefficient values (from assumed RC and LC filter shapes, see
// polar_pkg) and the word widths are this design's.
module iir_align
  import polar_pkg::*;
#(
  parameter logic signed [17:0] A1 = IIR_A1,
  parameter logic signed [17:0] A2 = IIR_A2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic [AMP_W-1:0]        x,
  input  logic signed [17:0]      b0,
  input  logic signed [17:0]      b1,
  input  logic signed [17:0]      b2,
  output logic [AMP_W-1:0]        y
);
  localparam int unsigned YW = 20;
  logic signed [YW-1:0] x1, x2, y1, y2, xs;
  logic signed [47:0]   acc, yr;
  logic signed [YW-1:0] ysat;

  assign xs  = YW'($signed({1'b0, x}));
  assign acc = 48'(b0) * 48'(xs) + 48'(b1) * 48'(x1) + 48'(b2) * 48'(x2)
             - 48'(A1) * 48'(y1) - 48'(A2) * 48'(y2);
  assign yr  = (acc + 48'(1 << (GAIN_FRAC - 1))) >>> GAIN_FRAC;
  assign ysat = (yr > 48'((1 << (YW - 1)) - 1)) ? YW'((1 << (YW - 1)) - 1) :
                (yr < -48'(1 << (YW - 1)))      ? YW'(-(1 << (YW - 1)))   : YW'(yr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; y <= '0;
    end else if (ce) begin
      x1 <= xs; x2 <= x1;
      y1 <= ysat; y2 <= y1;
      if (ysat < 0)                    y <= '0;
      else if (ysat > YW'(16'hFFFF))   y <= 16'hFFFF;
      else                             y <= AMP_W'(ysat);
    end
  end
endmodule
