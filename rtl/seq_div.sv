`timescale 1ns / 1ps
// seq_div: unsigned restoring divider, one quotient bit per clock.
// start loads num/den; done pulses W+1 clocks later with quot = num/den
// (truncated). A zero divisor gives an all-ones quotient. Helper of the
// tuning-curve compensation, which needs a handful of divisions per
// calibration run and no throughput.
module seq_div #(
  parameter int unsigned W = 44
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  logic [W-1:0]   rem, d;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]     trial;
  assign trial = {rem[W-2:0], quot[W-1]} - {1'b0, d};
  // rem shifted left with the next numerator bit (kept in quot as it empties)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; d <= '0; quot <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem <= '0; d <= den; quot <= num; cnt <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W]) begin
          rem  <= trial[W-1:0];
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= {rem[W-2:0], quot[W-1]};
          quot <= {quot[W-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
