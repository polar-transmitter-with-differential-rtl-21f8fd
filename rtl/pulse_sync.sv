`timescale 1ns / 1ps
// pulse_sync: moves a one-clock pulse from one clock domain to another.
// The source pulse flips a toggle register; the destination synchronises the
// toggle through two flops and pulses dst_pulse for one clock on every change.
// Source pulses must be spaced by at least three destination clocks.
module pulse_sync (
  input  logic src_clk,
  input  logic dst_clk,
  input  logic rst_n,
  input  logic src_pulse,
  output logic dst_pulse
);
  logic       tgl;
  logic [2:0] s;
  always_ff @(posedge src_clk or negedge rst_n)
    if (!rst_n) tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  always_ff @(posedge dst_clk or negedge rst_n)
    if (!rst_n) s <= '0;
    else s <= {s[1:0], tgl};
  assign dst_pulse = s[2] ^ s[1];
endmodule
