`timescale 1ns / 1ps
// tb_pwm_delay_line: toggles the delay-line input at random intervals longer
// than the whole line and checks that every tap k follows each edge after
// k unit delays (within 5 ps) with the right polarity.
module tb_pwm_delay_line;
  localparam int  L = 256;
  localparam real UNIT = 0.601;
  logic f_if = 1'b0;
  logic [L-1:1] taps;
  int checks = 0, failures = 0;

  pwm_delay_line #(.L(L), .UNIT_NS(UNIT)) dut (.f_if, .taps);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    for (int e = 0; e < 20; e++) begin
      f_if = ~f_if;
      for (int k = 1; k < L; k += 7) begin
        #(UNIT - 0.005);
        checks++;
        if (taps[k] == f_if || (k > 1 && taps[k-1] != f_if)) begin
          failures++; $display("edge %0d tap %0d early or previous tap late", e, k);
        end
        #0.01;
        checks++;
        if (taps[k] != f_if) begin failures++; $display("edge %0d tap %0d late", e, k); end
        if (k + 7 < L) #(6.0 * UNIT - 0.005);
        else #0;
      end
      #(50.0 + ($urandom % 100));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
