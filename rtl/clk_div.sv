`timescale 1ns / 1ps
// clk_div: gated divide-by-2^DIV_LOG2 clock divider of the FLL feedback path.
//
// The carrier f_C is brought down to the frequency detector by a divide-by-4
// (the CML stage next to the VCO) followed by a digital divide-by-8, 32 in
// all. In the low-power quasi-continuous mode the divider only runs in the
// 10% calibration slot; en (asynchronous, from the 1 MHz control-clock domain)
// is synchronised to clk_in and freezes the counter, so clk_out stops low-or-
// high where it is and the divider draws no switching power. clk_out is the
// counter MSB, a 50% duty square wave at f_in/2^DIV_LOG2.
// The ratios follow the transmitter description; the synchroniser and the
// counter implementation are this design's.
module clk_div #(
  parameter int unsigned DIV_LOG2 = 2
) (
  input  logic clk_in,
  input  logic rst_n,
  input  logic en,
  output logic clk_out
);
  logic [DIV_LOG2-1:0] cnt;
  logic [1:0]          en_s;
  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      en_s <= '0;
    end else begin
      en_s <= {en_s[0], en};
      if (en_s[1]) cnt <= cnt + 1'b1;
    end
  end
  assign clk_out = cnt[DIV_LOG2-1];
endmodule
