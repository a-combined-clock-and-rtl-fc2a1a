// ddj_cdr_top - all-digital clock and data recovery circuit with adaptive
// cancellation of data-dependent jitter.
//
// Loop: the serial input runs down a buffer chain (tdc_delay_line) whose
// taps are sampled by the TDC on the rising edge of the recovered clock,
// giving the phase error tc of each data edge.  The data retimer samples the
// middle tap of the chain on the falling edge, mid-eye, giving the recovered
// symbols a(n) (data_out).  The DDJ canceller removes from tc the part
// predicted by the preceding symbols and adapts its FIR taps by sign-LMS;
// the cleaned error e_c goes through the PI loop filter to the DCO, whose
// output is the recovered clock that closes the loop.
//
// Loop latency is three recovered-clock cycles from sampling to DCO code:
// TDC decoder register, canceller output register, loop-filter register.
// The published loop latency is also three cycles.
//
// This design's own choices: the retimer samples delay-line tap
// RETIME_TAP ((N_FF-1)/2 = 4) rather than the raw input, so that it sees the
// data with the same delay as the centre of the TDC window; reset is
// asynchronous and active low, and the DCO runs only while rst_n is high.
//
// The delay line and the DCO are behavioural models; everything else is
// synthesizable.  Observation outputs: tc, e_c/e_c_valid, the coefficients
// w, the DDJ estimate t_est, and the DCO code.
`timescale 1ps/1fs
module ddj_cdr_top
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_FF       = TDC_NFF,
  parameter real         TDC_STEP   = TDC_STEP_PS,
  parameter int unsigned N_TAPS     = N_TAPS_DEF,
  parameter int unsigned W_W        = W_W_DEF,
  parameter int unsigned W_FRAC     = W_FRAC_DEF,
  parameter int unsigned MU_SHIFT   = MU_SHIFT_DEF,
  parameter int unsigned KP_Q       = KP_Q_DEF,
  parameter int unsigned KI_Q       = KI_Q_DEF,
  parameter int unsigned GAIN_FRAC  = GAIN_FRAC_DEF,
  parameter int unsigned DCO_W      = DCO_W_DEF,
  parameter int unsigned RETIME_TAP = (N_FF - 1) / 2,
  parameter int unsigned TC_W       = $clog2(N_FF) + 1,
  parameter int unsigned SUM_W      = W_W + $clog2(N_TAPS) + 1,
  parameter int unsigned EC_W       = ((SUM_W > TC_W + W_FRAC) ? SUM_W : TC_W + W_FRAC) + 1
) (
  input  logic                    rst_n,
  input  logic                    data_in,
  output logic                    rec_clk,
  output logic                    data_out,
  output logic signed [TC_W-1:0]  tc,
  output logic                    tc_edge_found,
  output logic signed [EC_W-1:0]  e_c,
  output logic                    e_c_valid,
  output logic signed [W_W-1:0]   w [N_TAPS],
  output logic signed [SUM_W-1:0] t_est,
  output logic signed [DCO_W-1:0] dco_code,
  output logic                    lf_saturated
);

  logic [N_FF-1:0] taps;

  tdc_delay_line #(
    .N_TAPS  (N_FF),
    .STEP_PS (TDC_STEP)
  ) u_dline (
    .din  (data_in),
    .taps (taps)
  );

  tdc #(
    .N_FF (N_FF),
    .TC_W (TC_W)
  ) u_tdc (
    .clk        (rec_clk),
    .rst_n      (rst_n),
    .taps       (taps),
    .tc         (tc),
    .edge_found (tc_edge_found)
  );

  data_retimer u_retimer (
    .clk   (rec_clk),
    .rst_n (rst_n),
    .din   (taps[RETIME_TAP]),
    .dout  (data_out)
  );

  ddj_canceller #(
    .N_TAPS   (N_TAPS),
    .TC_W     (TC_W),
    .W_W      (W_W),
    .W_FRAC   (W_FRAC),
    .MU_SHIFT (MU_SHIFT),
    .SUM_W    (SUM_W),
    .EC_W     (EC_W)
  ) u_ddj (
    .clk       (rec_clk),
    .rst_n     (rst_n),
    .tc        (tc),
    .a_n       (data_out),
    .e_c       (e_c),
    .e_c_valid (e_c_valid),
    .w         (w),
    .t_est     (t_est)
  );

  loop_filter #(
    .IN_W      (EC_W),
    .IN_FRAC   (W_FRAC),
    .GAIN_FRAC (GAIN_FRAC),
    .KP_Q      (KP_Q),
    .KI_Q      (KI_Q),
    .OUT_W     (DCO_W)
  ) u_lf (
    .clk       (rec_clk),
    .rst_n     (rst_n),
    .e_c       (e_c),
    .code      (dco_code),
    .saturated (lf_saturated)
  );

  dco #(
    .CODE_W (DCO_W)
  ) u_dco (
    .enable  (rst_n),
    .code    (dco_code),
    .clk_out (rec_clk)
  );

endmodule
