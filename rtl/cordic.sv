`timescale 1ns / 1ps
// cordic: pipelined vectoring CORDIC converting I/Q to envelope and phase.
//
// The polar transmitter splits each complex baseband sample into an
// envelope A (to the PWM path) and a phase phi (to the differentiator and the
// VCO path). A first stage folds the left half plane into the right one
// (negating I and Q and adding pi), then ITER micro-rotations drive Q to zero
// while accumulating the rotation angle from an arctangent table. The last
// stage removes the CORDIC gain (x 0.60725).
//
// Interface: in_valid/i_in/q_in are signed Q1.15; out_valid, amp (unsigned,
// 2^16 = 1.0) and phase (16-bit binary angle, 2^16 = 2*pi) follow ITER+2
// clocks later. One sample per clock. The CORDIC algorithm itself is the
// standard one; its word widths, iteration count and pipelining are choices
// of this design.
module cordic
  import polar_pkg::*;
#(
  parameter int unsigned ITER = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [BB_W-1:0]  i_in,
  input  logic signed [BB_W-1:0]  q_in,
  output logic                    out_valid,
  output logic [AMP_W-1:0]        amp,
  output logic [PH_W-1:0]         phase
);
  localparam int unsigned XW = BB_W + 4;   // two guard bits, growth bits
  localparam int unsigned AW = PH_W + 2;   // angle with two guard bits
  // atan(2^-i) / (2*pi) * 2^18, i = 0..15
  localparam logic [AW-1:0] ATAN [16] = '{
    18'd32768, 18'd19344, 18'd10221, 18'd5188, 18'd2604, 18'd1303, 18'd652, 18'd326,
    18'd163,   18'd81,    18'd41,    18'd20,   18'd10,   18'd5,    18'd3,   18'd1};
  localparam logic [16:0] KINV = 17'd39797; // 2^16 / prod(sqrt(1+2^-2i))

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [AW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];

  // stage 0: half-plane fold
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (i_in < 0) begin
        xs[0] <= -(XW'(i_in) <<< 2);
        ys[0] <= -(XW'(q_in) <<< 2);
        zs[0] <= AW'(1) << (AW - 1);       // pi
      end else begin
        xs[0] <= XW'(i_in) <<< 2;
        ys[0] <= XW'(q_in) <<< 2;
        zs[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0; vs[k+1] <= 1'b0;
      end else begin
        vs[k+1] <= vs[k];
        if (ys[k] < 0) begin               // rotate counter-clockwise
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ATAN[k];
        end else begin                     // rotate clockwise
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ATAN[k];
        end
      end
    end
  end

  // output: gain correction, x holds |v|*K*4 in Q1.15 units
  logic [XW+16:0] mag_full;
  logic [XW+16:0] mag_scaled;
  assign mag_full   = (XW+17)'($unsigned(xs[ITER])) * (XW+17)'(KINV);
  assign mag_scaled = (mag_full + (XW+17)'(1 << 16)) >> 17;  // /4 guard, *2 to 2^16 scale, /2^16 gain

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; amp <= '0; phase <= '0;
    end else begin
      out_valid <= vs[ITER];
      amp       <= (mag_scaled > (XW+17)'(16'hFFFF)) ? 16'hFFFF : mag_scaled[AMP_W-1:0];
      phase     <= PH_W'((zs[ITER] + AW'(2)) >> 2);
    end
  end
endmodule
