`timescale 1ns / 1ps
// fll_ctrl: 8-bit bidirectional integral counter and dual-mode FSM of the FLL.
//
// Every up/dn decision of the frequency detector makes the counter add or
// subtract one. The FSM decides what the count drives:
//  * mode "1", coarse (after reset or recal): the counter moves in steps of 8,
//    i.e. by one on its 5 MSBs, which drive the VCO capacitor bank S4~0 while
//    the DAC code sits at mid-scale 128. When the detector reverses direction
//    (the target is bracketed) or the 5-bit field hits an end, S4~0 is frozen
//    and the FSM enters mode "2".
//  * mode "2", fine: the counter restarts at 128 and moves by one; all 8 bits
//    are the code of the delta-sigma DAC that sets V_CAL.
// Counts saturate at 0 and 255. Between decisions everything holds, which is
// what lets the duty-cycled loop keep f_C while the divider sleeps.
// Interface: clk is f_CLK; up/dn one-clock pulses; outputs registered.
// Increasing counts are taken to raise f_C. Counter width, S4~0 = MSBs and the
// two modes follow the transmitter description; the reversal rule for leaving
// mode "1" and the mid-scale restart are this design's choices.
module fll_ctrl
  import polar_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       recal,
  input  logic       up,
  input  logic       dn,
  output logic [4:0] s_word,
  output logic [7:0] dac_code,
  output fll_mode_e  mode
);
  logic [7:0] cnt;
  logic       last_up, have_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= FLL_COARSE; cnt <= 8'd128; s_word <= 5'd16; dac_code <= 8'd128;
      last_up <= 1'b0; have_last <= 1'b0;
    end else if (recal) begin
      mode <= FLL_COARSE; cnt <= 8'd128; s_word <= 5'd16; dac_code <= 8'd128;
      have_last <= 1'b0;
    end else begin
      unique case (mode)
        FLL_COARSE: if (up || dn) begin
          if (have_last && (up != last_up)) begin
            mode <= FLL_FINE; cnt <= 8'd128;          // bracketed: freeze S4~0
          end else if (up && cnt[7:3] == 5'd31 || dn && cnt[7:3] == 5'd0) begin
            mode <= FLL_FINE; cnt <= 8'd128;          // end of the bank
          end else begin
            cnt    <= up ? cnt + 8'd8 : cnt - 8'd8;
            s_word <= up ? cnt[7:3] + 5'd1 : cnt[7:3] - 5'd1;
          end
          last_up   <= up;
          have_last <= 1'b1;
        end
        FLL_FINE: begin
          if (up && cnt != 8'd255) cnt <= cnt + 8'd1;
          else if (dn && cnt != 8'd0) cnt <= cnt - 8'd1;
          dac_code <= (up && cnt != 8'd255) ? cnt + 8'd1 :
                      (dn && cnt != 8'd0)   ? cnt - 8'd1 : cnt;
        end
        default: mode <= FLL_COARSE;
      endcase
    end
  end
endmodule
