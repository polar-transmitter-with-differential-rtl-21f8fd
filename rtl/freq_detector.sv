`timescale 1ns / 1ps
// freq_detector: frequency detector of the f_C calibration loop.
//
// Clocked by f_CLK = f_C/32. The 1 MHz reference F_REF is synchronised and
// its rising edges delimit windows; the number of f_CLK cycles in a window is
// f_C/(32*F_REF), which equals N_CAL when f_C = N_CAL x 32 MHz. After every
// full window (the first one after arming is dropped) exactly one of up/dn
// pulses when the count is below/above N_CAL; an equal count gives none.
// Driven low, arm cancels the running window, so windows cut by the gated
// divider are never judged.
//
// Measurement port (for the tuning-curve compensation): a meas_req pulse
// starts a count over MEAS_REFS whole windows; meas_done then pulses and
// meas_val holds count - N_CAL*MEAS_REFS, i.e. the frequency offset in units
// of 32*F_REF/MEAS_REFS.
// The comparison against N_CAL x F_REF follows the transmitter description;
// window counting, arming and the measurement port are this design's.
module freq_detector #(
  parameter int unsigned CNT_W     = 12,
  parameter int unsigned MEAS_REFS = 8192,
  parameter int unsigned FW        = 24
) (
  input  logic                 clk,        // f_CLK
  input  logic                 rst_n,
  input  logic                 ref_in,     // F_REF, asynchronous
  input  logic                 arm,
  input  logic [6:0]           n_cal,
  output logic                 up,
  output logic                 dn,
  input  logic                 meas_req,
  output logic                 meas_done,
  output logic signed [FW-1:0] meas_val
);
  logic [2:0]       rs;
  logic             ref_rise, primed, arm_s;
  logic [CNT_W-1:0] cnt, period;
  logic [1:0]       as;
  // measurement
  logic             m_pend, m_run;
  logic [$clog2(MEAS_REFS+1)-1:0] m_win;
  logic [FW-1:0]    m_acc;

  assign ref_rise = rs[1] & ~rs[2];
  assign arm_s    = as[1];
  assign period   = cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= '0; as <= '0; cnt <= '0; primed <= 1'b0; up <= 1'b0; dn <= 1'b0;
      m_pend <= 1'b0; m_run <= 1'b0; m_win <= '0; m_acc <= '0;
      meas_done <= 1'b0; meas_val <= '0;
    end else begin
      rs <= {rs[1:0], ref_in};
      as <= {as[0], arm};
      up <= 1'b0; dn <= 1'b0; meas_done <= 1'b0;
      if (meas_req) m_pend <= 1'b1;
      if (!arm_s) begin
        primed <= 1'b0;
        m_run  <= 1'b0;
      end else if (ref_rise) begin
        cnt    <= '0;
        primed <= 1'b1;
        if (primed) begin
          up <= (period < CNT_W'(n_cal));
          dn <= (period > CNT_W'(n_cal));
        end
        // measurement windows
        if (m_run && primed) begin
          m_acc <= m_acc + FW'(period);
          m_win <= m_win + 1'b1;
          if (m_win == ($bits(m_win))'(MEAS_REFS - 1)) begin
            m_run     <= 1'b0;
            meas_done <= 1'b1;
            meas_val  <= $signed(m_acc + FW'(period) - FW'(n_cal) * FW'(MEAS_REFS));
          end
        end else if (m_pend && !m_run) begin
          m_pend <= 1'b0; m_run <= 1'b1; m_win <= '0; m_acc <= '0;
        end
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
