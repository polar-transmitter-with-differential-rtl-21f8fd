`timescale 1ns / 1ps
// gray_sync: carries a slowly counting W-bit value across clock domains.
// The source value is registered in Gray code, synchronised by two flops in
// the destination domain and converted back to binary. Safe when the source
// changes by at most one step between destination samples, as the FLL
// integral counter does in its fine mode.
module gray_sync #(
  parameter int unsigned W = 8
) (
  input  logic         src_clk,
  input  logic         dst_clk,
  input  logic         rst_n,
  input  logic [W-1:0] src_bin,
  input  logic [W-1:0] rst_val,
  output logic [W-1:0] dst_bin
);
  logic [W-1:0] g_src, g1, g2;
  always_ff @(posedge src_clk or negedge rst_n)
    if (!rst_n) g_src <= rst_val ^ (rst_val >> 1);
    else        g_src <= src_bin ^ (src_bin >> 1);
  always_ff @(posedge dst_clk or negedge rst_n)
    if (!rst_n) begin g1 <= rst_val ^ (rst_val >> 1); g2 <= rst_val ^ (rst_val >> 1); end
    else        begin g1 <= g_src; g2 <= g1; end
  always_comb begin
    dst_bin[W-1] = g2[W-1];
    for (int k = W - 2; k >= 0; k--) dst_bin[k] = dst_bin[k+1] ^ g2[k];
  end
endmodule
