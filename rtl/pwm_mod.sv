`timescale 1ns / 1ps
// pwm_mod: digital IF pulse-width modulator (quantizer, tap multiplexer, XOR).
//
// The envelope is carried by the pulse width of a 3.25 MHz IF clock. F_IF
// runs through a delay line of L-1 cells with unit delay 1/(2 L f_IF); the
// L-level quantizer turns the envelope into a tap number k, the multiplexer
// picks the copy of F_IF delayed by k units, and the XOR of F_IF with that
// copy is high for k units after every F_IF edge. The output therefore pulses
// at 2 f_IF with a duty cycle of k/L, which the power switch and the LC filter
// turn into the PA supply voltage.
//
// Here F_IF is clk/IF_DIV (26 MHz / 8). The quantizer rounds env (2^16 = 1.0)
// to k = 0 .. L-1 and loads k only on the rising clock edge that raises F_IF,
// when every tap is still low, so a new code never cuts a pulse short.
// taps[k] (k >= 1) come from the delay line; tap 0 is F_IF itself.
// L = 256, f_IF = 3.25 MHz and the delay-multiplexer/XOR structure follow the
// transmitter description; the rounding quantizer and the code update instant
// are this design's.
module pwm_mod
  import polar_pkg::*;
#(
  parameter int unsigned L      = 256,
  parameter int unsigned IF_DIV = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AMP_W-1:0]     env,
  input  logic [L-1:1]         taps,
  output logic                 f_if,
  output logic [$clog2(L)-1:0] code,
  output logic                 pwm_out
);
  localparam int unsigned KW = $clog2(L);
  localparam int unsigned DW = $clog2(IF_DIV);
  localparam int unsigned SH = AMP_W - KW;

  logic [DW-1:0]  div;
  logic           if_rise;
  logic [AMP_W:0] q;
  logic           sel;

  assign if_rise = (div == DW'(IF_DIV / 2 - 1));
  assign q       = ((AMP_W+1)'(env) + (AMP_W+1)'(1 << (SH - 1))) >> SH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; f_if <= 1'b0; code <= '0;
    end else begin
      div <= (div == DW'(IF_DIV - 1)) ? '0 : div + 1'b1;
      if (div == DW'(IF_DIV / 2 - 1)) f_if <= 1'b1;
      if (div == DW'(IF_DIV - 1))     f_if <= 1'b0;
      if (if_rise) code <= (q > (AMP_W+1)'(L - 1)) ? KW'(L - 1) : KW'(q);
    end
  end

  always_comb begin
    sel = f_if;
    for (int k = 1; k < L; k++)
      if (code == KW'(k)) sel = taps[k];
  end
  assign pwm_out = f_if ^ sel;
endmodule
