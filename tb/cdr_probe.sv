// cdr_probe - test-bench helper: one ddj_cdr_top instance with its own
// parameters plus the measurements taken on it.
//
// It is fed the serial data of a shared transmitter.  From cycle START to cycle STOP it
// counts bit errors of the recovered data with a self-synchronising PRBS
// check (a 2^23-1 sequence obeys b(n) = b(n-23) ^ b(n-18), so every
// violation is an error or a slip), and accumulates the rms of the TDC code
// and of the DDJ-cancelled error e_c on transition cycles, in UI.  At
// report time it prints one line and exposes the results on its outputs.
`timescale 1ps/1fs
module cdr_probe
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_FF     = TDC_NFF,
  parameter real         TDC_STEP = TDC_STEP_PS,
  parameter int unsigned N_TAPS   = N_TAPS_DEF,
  parameter int unsigned W_W      = W_W_DEF,
  parameter int unsigned W_FRAC   = W_FRAC_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF,
  parameter int unsigned KP_Q     = KP_Q_DEF,
  parameter int unsigned KI_Q     = KI_Q_DEF,
  parameter int          START    = 60000,
  parameter int          STOP     = 119000
) (
  input  logic rst_n,
  input  logic data_in,
  input  logic report,
  output int   bit_errs,
  output int   n_checked,
  output real  rms_tc_ui,
  output real  rms_ec_ui,
  output real  w0_ui
);

  localparam int unsigned TC_W  = $clog2(N_FF) + 1;
  localparam int unsigned SUM_W = W_W + $clog2(N_TAPS) + 1;
  localparam int unsigned EC_W  = ((SUM_W > TC_W + W_FRAC) ? SUM_W : TC_W + W_FRAC) + 1;
  localparam real RES_UI = TDC_STEP / UI_PS;

  logic rec_clk, data_out, tc_edge_found, e_c_valid, lf_saturated;
  logic signed [TC_W-1:0]  tc;
  logic signed [EC_W-1:0]  e_c;
  logic signed [W_W-1:0]   w [N_TAPS];
  logic signed [SUM_W-1:0] t_est;
  logic signed [DCO_W_DEF-1:0] dco_code;

  ddj_cdr_top #(
    .N_FF (N_FF), .TDC_STEP (TDC_STEP), .N_TAPS (N_TAPS), .W_W (W_W), .W_FRAC (W_FRAC),
    .MU_SHIFT (MU_SHIFT), .KP_Q (KP_Q), .KI_Q (KI_Q)
  ) u_cdr (
    .rst_n, .data_in, .rec_clk, .data_out, .tc, .tc_edge_found, .e_c, .e_c_valid,
    .w, .t_est, .dco_code, .lf_saturated
  );

  logic [23:0] rx_hist = '0;
  int  n_cyc = 0;
  real s_tc = 0.0, s_tc2 = 0.0, s_ec = 0.0, s_ec2 = 0.0;
  int  n_tc = 0, n_ec = 0;

  initial begin
    bit_errs = 0; n_checked = 0;
    rms_tc_ui = 0.0; rms_ec_ui = 0.0; w0_ui = 0.0;
  end

  always @(posedge rec_clk) begin
    n_cyc++;
    rx_hist = {rx_hist[22:0], data_out};
    if (n_cyc > START && n_cyc <= STOP) begin
      n_checked++;
      if (rx_hist[0] != (rx_hist[23] ^ rx_hist[18])) bit_errs++;
      if (u_cdr.u_ddj.trans) begin
        s_tc += $itor(tc); s_tc2 += $itor(tc) * $itor(tc); n_tc++;
      end
      if (e_c_valid) begin
        real e;
        e = $itor(e_c) / $itor(1 << W_FRAC);
        s_ec += e; s_ec2 += e * e; n_ec++;
      end
    end
  end

  always @(posedge report) begin
    rms_tc_ui = RES_UI * $sqrt(s_tc2 / n_tc - (s_tc / n_tc) ** 2);
    rms_ec_ui = RES_UI * $sqrt(s_ec2 / n_ec - (s_ec / n_ec) ** 2);
    w0_ui     = RES_UI * $itor(w[0]) / $itor(1 << W_FRAC);
    $display("N_FF=%0d res=%0.3f UI taps=%0d: bit errors %0d/%0d, rms tc %0.4f UI, rms e_c %0.4f UI, w0 %0.4f UI",
             N_FF, RES_UI, N_TAPS, bit_errs, n_checked, rms_tc_ui, rms_ec_ui, w0_ui);
  end

endmodule
