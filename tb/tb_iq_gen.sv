`timescale 1ns / 1ps
// tb_iq_gen: drives random 8PSK symbols and checks every I/Q sample against
// a floating-point model: constellation point of symbol s after n symbols at
// angle (2s + 3n mod 16)*pi/8 with magnitude AMP, linear interpolation from
// the previous point over SPS samples. Also checks that a symbol is taken
// exactly every SPS sample strobes and that the output follows the strobe by
// one clock.
module tb_iq_gen;
  localparam int SPS = 24;
  localparam real AMP = 26214.0;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [2:0] sym = '0;
  logic sym_take, out_valid;
  logic signed [15:0] i_out, q_out;
  int checks = 0, failures = 0;
  real pi_prev, pq_prev, pi_cur, pq_cur;
  int  rot, cnt, takes;
  real ang;
  int  idx;

  iq_gen #(.SPS(SPS), .AMP(26214)) dut (.clk, .rst_n, .ce, .sym, .sym_take, .out_valid, .i_out, .q_out);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pi_prev = 0; pq_prev = 0; pi_cur = AMP; pq_cur = 0; rot = 0; cnt = 0; takes = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 24 * 400; k++) begin
      real ei, eq;
      bit  tk;
      @(posedge clk);
      ce <= 1'b1; sym <= 3'($urandom);
      #0.1;
      tk = sym_take;
      @(posedge clk);
      ce <= 1'b0;
      #0.1;
      ei = pi_prev + (pi_cur - pi_prev) * (cnt + 1) / SPS;
      eq = pq_prev + (pq_cur - pq_prev) * (cnt + 1) / SPS;
      checks++;
      if (!out_valid || (real'(i_out) - ei) > 3.0 || (real'(i_out) - ei) < -3.0 ||
          (real'(q_out) - eq) > 3.0 || (real'(q_out) - eq) < -3.0) begin
        failures++;
        if (failures < 10) $display("k=%0d I/Q=%0d,%0d expected %f,%f", k, i_out, q_out, ei, eq);
      end
      checks++;
      if (tk != (cnt == SPS - 1)) begin failures++; $display("sym_take at wrong sample %0d", cnt); end
      if (cnt == SPS - 1) begin
        idx = (2 * sym + rot) % 16;
        ang = PI * idx / 8.0;
        pi_prev = pi_cur; pq_prev = pq_cur;
        pi_cur = AMP * $cos(ang); pq_cur = AMP * $sin(ang);
        rot = (rot + 3) % 16;
        cnt = 0; takes++;
      end else cnt++;
      repeat (2) @(posedge clk);
    end
    checks++;
    if (takes != 400) begin failures++; $display("takes %0d", takes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
