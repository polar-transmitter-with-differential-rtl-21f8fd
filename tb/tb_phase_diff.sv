`timescale 1ns / 1ps
// tb_phase_diff: feeds phase sequences to the five-point differentiator.
//  * constant-frequency ramps (including wrap-around): D must equal 12*step,
//    i.e. f_in = fs*D/(12*2^16) is exactly the ramp's frequency;
//  * random phase walks: D must equal the five-point formula
//    phi[k-2] - 8 phi[k-1] + 8 phi[k+1] - phi[k+2] evaluated with wrapped
//    integer differences, one clock after the sample phi[k+2].
module tb_phase_diff;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, fin_valid;
  logic [15:0] phase_in = '0;
  logic signed [19:0] fin_d;
  int checks = 0, failures = 0;
  int hist [5];
  int n;

  phase_diff dut (.clk, .rst_n, .in_valid, .phase_in, .fin_valid, .fin_d);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(input int d);
    d = d & 16'hFFFF;
    return d >= 32768 ? d - 65536 : d;
  endfunction

  task automatic push(input int p, input int exp_ramp, input bit check_ramp);
    int e;
    @(posedge clk);
    in_valid <= 1'b1; phase_in <= 16'(p);
    for (int k = 0; k < 4; k++) hist[k] = hist[k+1];
    hist[4] = p & 16'hFFFF;
    n++;
    @(posedge clk);
    in_valid <= 1'b0;
    #0.1;
    if (n >= 5) begin
      e = 8 * wrap(hist[3] - hist[1]) - wrap(hist[4] - hist[0]);
      checks++;
      if (!fin_valid || fin_d != 20'(e)) begin
        failures++; $display("D=%0d expected %0d", fin_d, e);
      end
      if (check_ramp) begin
        checks++;
        if (fin_d != 20'(exp_ramp)) begin failures++; $display("ramp D=%0d expected %0d", fin_d, exp_ramp); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = -8000; s <= 8000; s += 1000) begin
      int p;
      p = $urandom % 65536; n = 0;
      for (int k = 0; k < 40; k++) begin
        push(p, 12 * s, 1'b1);
        p = (p + s) & 16'hFFFF;
      end
    end
    n = 0;
    begin
      int p;
      p = 0;
      for (int k = 0; k < 3000; k++) begin
        push(p, 0, 1'b0);
        p = (p + int'($urandom % 12001) - 6000) & 16'hFFFF;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
