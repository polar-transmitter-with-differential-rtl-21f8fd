`timescale 1ns / 1ps
// tuning_comp: digital pre-compensation of the VCO modulation tuning curve.
//
// The differential varactor pair leaves a slight nonlinearity in the VCO's
// frequency-versus-V_MOD curve. The block works in two modes:
//  * mode "1" (measure, started by meas_start): the modulation path runs open
//    loop. For each of N_PTS voltage offsets V_i = (i - c)*2^VSTEP_SH
//    (c = N_PTS/2, the voltage offset table) it drives 0.5 + V_i to the
//    delta-sigma DAC, waits SETTLE clocks for the RC filter, asks for a
//    frequency measurement (freq_req) and stores the returned offset
//    (freq_val, the frequency offset table). It then computes the linear-gain
//    error of every point against the end-to-end average slope,
//      gain_i = ((f_last - f_first) * (i - c)) / ((N_PTS-1) * (f_i - f_c)),
//    in Q2.14, with a sequential divider, and stores it in the gain table.
//    The centre entry is the mean of its two neighbours. A result that is
//    negative, out of range or divides by zero stores 1.0.
//  * mode "2" (normal): each modulation sample V_in is multiplied by the
//    gain of its nearest table point and offset to the DSM mid-scale,
//      dsm_in = clamp(0.5 + V_in * gain(V_in), 0.25, 0.75).
// Reset loads all gains with 1.0 (no correction).
//
// Interface: vin_valid/vin (signed, DSM units) in; dsm_in registered, one
// clock after vin_valid. freq_req is a one-clock pulse; the measurement
// returns with freq_valid/freq_val at any later time. meas_busy is high for
// the whole of mode 1. The two modes, the tables and the multiplication
// follow the transmitter description; the number of points, their spacing,
// the secant-gain formula and the settle time are this design's choices.
module tuning_comp
  import polar_pkg::*;
#(
  parameter int unsigned N_PTS    = 9,
  parameter int unsigned VSTEP_SH = 10,     // point spacing 2^10 = 1/64 of DSM scale
  parameter int unsigned SETTLE   = 256,    // clocks from V_i applied to measurement
  parameter int unsigned FW       = 24      // frequency measurement width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 meas_start,
  output logic                 meas_busy,
  input  logic                 vin_valid,
  input  logic signed [15:0]   vin,
  output logic [DSM_W-1:0]     dsm_in,
  output logic                 freq_req,
  input  logic                 freq_valid,
  input  logic signed [FW-1:0] freq_val,
  output logic [15:0]          gain_mon [N_PTS]
);
  localparam int unsigned C   = N_PTS / 2;
  localparam int unsigned IW  = $clog2(N_PTS);
  localparam int unsigned DW  = FW + 1 + 4 + GAIN_FRAC + 1;  // divider width
  localparam int unsigned SW  = $clog2(SETTLE + 1);

  typedef enum logic [2:0] {S_IDLE, S_APPLY, S_WAITF, S_CALC, S_DIV, S_CENTER} state_e;
  state_e state;

  logic [IW-1:0]        idx;
  logic [SW-1:0]        scnt;
  logic signed [FW-1:0] ftab [N_PTS];
  logic [15:0]          gtab [N_PTS];

  // ---- mode 2 datapath ---------------------------------------------------
  logic signed [17:0] vsel;
  logic [IW-1:0]      gidx;
  logic signed [33:0] vprod;
  logic signed [19:0] vout;
  always_comb begin
    vsel = 18'(vin) + 18'(C << VSTEP_SH) + 18'(1 << (VSTEP_SH - 1));
    if (vsel < 0)                                   gidx = '0;
    else if ((vsel >>> VSTEP_SH) > 18'(N_PTS - 1))  gidx = IW'(N_PTS - 1);
    else                                            gidx = IW'(vsel >>> VSTEP_SH);
    vprod = 34'(vin) * 34'($signed({1'b0, gtab[gidx]}));
    vout  = 20'(DSM_MID) + 20'(vprod >>> GAIN_FRAC);
  end

  // ---- divider for mode 1 ------------------------------------------------
  logic              div_start, div_done, div_busy;
  logic [DW-1:0]     div_num, div_den, div_q;
  logic              div_neg;
  seq_div #(.W(DW)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q));

  logic signed [FW:0]   fspan, fdelta;
  logic signed [4:0]    ioff;
  logic signed [FW+5:0] nprod;
  always_comb begin
    fspan  = (FW+1)'(ftab[N_PTS-1]) - (FW+1)'(ftab[0]);
    fdelta = (FW+1)'(ftab[idx]) - (FW+1)'(ftab[C]);
    ioff   = 5'(idx) - 5'(C);
    nprod  = (FW+6)'(fspan) * (FW+6)'(ioff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; idx <= '0; scnt <= '0;
      dsm_in <= DSM_MID; freq_req <= 1'b0; meas_busy <= 1'b0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0; div_neg <= 1'b0;
      for (int k = 0; k < N_PTS; k++) begin
        gtab[k] <= GAIN_ONE;
        ftab[k] <= '0;
      end
    end else begin
      freq_req  <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (meas_start) begin
            state <= S_APPLY; idx <= '0; scnt <= '0; meas_busy <= 1'b1;
          end else if (vin_valid) begin
            if (vout > 20'(DSM_MAX))      dsm_in <= DSM_MAX;
            else if (vout < 20'(DSM_MIN)) dsm_in <= DSM_MIN;
            else                          dsm_in <= DSM_W'(vout);
          end
        end
        S_APPLY: begin          // voltage offset table entry to the DAC
          dsm_in <= DSM_W'(32'(DSM_MID) + (32'(idx) << VSTEP_SH) - (32'(C) << VSTEP_SH));
          if (scnt == SW'(SETTLE)) begin
            freq_req <= 1'b1; state <= S_WAITF;
          end else begin
            scnt <= scnt + 1'b1;
          end
        end
        S_WAITF: begin
          if (freq_valid) begin
            ftab[idx] <= freq_val;
            scnt <= '0;
            if (idx == IW'(N_PTS - 1)) begin
              idx <= '0; state <= S_CALC; dsm_in <= DSM_MID;
            end else begin
              idx <= idx + 1'b1; state <= S_APPLY;
            end
          end
        end
        S_CALC: begin           // set up |num| / |den| for point idx
          if (idx == IW'(C)) begin
            idx <= idx + 1'b1;
          end else begin
            div_num   <= DW'(nprod < 0 ? -nprod : nprod) << GAIN_FRAC;
            div_den   <= DW'(fdelta < 0 ? -fdelta : fdelta) << $clog2(N_PTS - 1);
            div_neg   <= (nprod < 0) != (fdelta < 0);
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: begin
          if (div_done) begin
            if (div_neg || fdelta == 0 || nprod == 0 || div_q > DW'(16'hFFFF))
              gtab[idx] <= GAIN_ONE;
            else
              gtab[idx] <= 16'(div_q);
            if (idx == IW'(N_PTS - 1)) state <= S_CENTER;
            else begin
              idx <= idx + 1'b1; state <= S_CALC;
            end
          end
        end
        S_CENTER: begin
          gtab[C]   <= 16'((17'(gtab[C-1]) + 17'(gtab[C+1])) >> 1);
          state     <= S_IDLE;
          meas_busy <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb for (int k = 0; k < N_PTS; k++) gain_mon[k] = gtab[k];
endmodule
