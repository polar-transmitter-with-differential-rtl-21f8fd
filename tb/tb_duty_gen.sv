`timescale 1ns / 1ps
// tb_duty_gen: with the 1 MHz reference, div_en must be high for exactly 50
// of every 500 cycles (0.05 ms of each 0.5 ms, 2 kHz control clock), fd_arm
// one cycle shorter inside it, and both stay high with quasi_en low.
module tb_duty_gen;
  logic clk = 1'b0, rst_n = 1'b0, quasi_en = 1'b1;
  logic div_en, fd_arm, slot_start;
  int checks = 0, failures = 0;

  duty_gen #(.PERIOD(500), .ACTIVE(50)) dut (.clk_ref(clk), .rst_n, .quasi_en, .div_en, .fd_arm, .slot_start);
  always #500 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on, arm, starts, run;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge slot_start);
    for (int p = 0; p < 6; p++) begin
      on = 0; arm = 0; starts = 0; run = 0;
      for (int c = 0; c < 500; c++) begin
        @(posedge clk); #1;
        on += int'(div_en); arm += int'(fd_arm); starts += int'(slot_start);
        if (fd_arm && !div_en) run++;
      end
      checks += 4;
      if (on != 50)   begin failures++; $display("on %0d", on); end
      if (arm != 49)  begin failures++; $display("arm %0d", arm); end
      if (starts != 1) begin failures++; $display("starts %0d", starts); end
      if (run != 0)   begin failures++; $display("arm outside slot"); end
    end
    quasi_en <= 1'b0;
    repeat (3) @(posedge clk);
    for (int c = 0; c < 1000; c++) begin
      @(posedge clk); #1;
      checks++;
      if (!div_en || !fd_arm) begin failures++; $display("not continuous"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
