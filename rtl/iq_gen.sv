`timescale 1ns / 1ps
// iq_gen: 8PSK baseband I/Q generator from a look-up table.
//
// Every SPS samples a new 3-bit symbol is taken (sym_take pulses while it is
// read). Its constellation point is looked up in a 16-entry cosine table at
// multiples of pi/8: point index = 2*symbol + rotation, where the rotation
// advances by 3 (3*pi/8) per symbol so consecutive points never lie opposite
// each other. Between two points the I/Q samples are interpolated linearly,
// which keeps the phase continuous for the differentiator that follows.
//
// Interface: ce is the 6.5 MHz sample strobe; i_out/q_out (signed Q1.15,
// magnitude AMP) are registered and valid one clock after each ce
// (out_valid). The LUT-based 6.5 MHz generation follows the transmitter
// description; the symbol mapping, the 3*pi/8 rotation, SPS = 24 (6.5 MHz /
// 270.833 ksym/s) and the linear interpolation in place of the standard EDGE
// pulse shape are choices of this design.
module iq_gen
  import polar_pkg::*;
#(
  parameter int unsigned SPS = 24,        // samples per symbol
  parameter int unsigned AMP = 26214      // point magnitude, Q1.15 (0.8)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic [2:0]             sym,
  output logic                   sym_take,
  output logic                   out_valid,
  output logic signed [BB_W-1:0] i_out,
  output logic signed [BB_W-1:0] q_out
);
  localparam logic signed [15:0] COS_LUT [16] = '{
    16'sd32767, 16'sd30273, 16'sd23170, 16'sd12539, 16'sd0, -16'sd12539, -16'sd23170, -16'sd30273,
   -16'sd32767, -16'sd30273, -16'sd23170, -16'sd12539, 16'sd0, 16'sd12539, 16'sd23170, 16'sd30273};
  localparam longint unsigned RECIP = ((64'd1 << 24) + SPS / 2) / SPS;   // 2^24/SPS
  localparam int unsigned CW = $clog2(SPS + 1);

  logic [CW-1:0]       cnt;
  logic [3:0]          rot;
  logic signed [17:0]  pi_prev, pq_prev, pi_cur, pq_cur;
  logic [3:0]          idx_new;

  function automatic logic signed [17:0] scale(input logic signed [15:0] c);
    logic signed [33:0] p;
    p = 34'(c) * 34'(AMP);
    return 18'(p >>> 15);
  endfunction

  assign idx_new  = 4'({sym, 1'b0}) + rot;
  assign sym_take = ce && (cnt == CW'(SPS - 1));

  // interpolation: prev + (cur - prev) * cnt / SPS
  logic signed [47:0] di, dq;
  assign di = 48'(pi_cur - pi_prev) * 48'(cnt + CW'(1)) * 48'(RECIP);
  assign dq = 48'(pq_cur - pq_prev) * 48'(cnt + CW'(1)) * 48'(RECIP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; rot <= '0;
      pi_prev <= '0; pq_prev <= '0;
      pi_cur  <= scale(COS_LUT[0]);
      pq_cur  <= '0;
      i_out <= '0; q_out <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= ce;
      if (ce) begin
        i_out <= 16'(pi_prev + 18'(di >>> 24));
        q_out <= 16'(pq_prev + 18'(dq >>> 24));
        if (sym_take) begin
          cnt     <= '0;
          rot     <= rot + 4'd3;
          pi_prev <= pi_cur;
          pq_prev <= pq_cur;
          pi_cur  <= scale(COS_LUT[idx_new]);
          pq_cur  <= scale(COS_LUT[4'(idx_new - 4'd4)]);   // sin(a) = cos(a - pi/2)
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end
endmodule
