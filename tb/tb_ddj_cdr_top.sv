// tb_ddj_cdr_top - end-to-end test of the CDR with adaptive DDJ cancellation,
// at the default (design-point) parameters.
//
// Transmitter: a 2^23-1 PRBS (x^23 + x^18 + 1) at 2.5 Gb/s, 500 ppm faster
// than the DCO centre frequency.  Channel: first-order low-pass with
// alpha = exp(-T/tau) = 0.3.  Each data edge is placed at the half-level
// crossing time of the first-order channel response, computed exactly from
// the 24 preceding symbols,
//   t_c = tau * ln(2 - 2 * sum_{m>=2} b(n-m) * (alpha^(m-1) - alpha^m)),
// with b = a for a rising edge and b = 1-a for a falling edge, plus 0.01 UI
// rms Gaussian random jitter (the DCO adds its own 0.01 UI rms).
//
// Checks:
//   * the recovered data equals the transmitted PRBS (found latency) over
//     the second half of the run, with no bit error;
//   * the CDR locks (mean of e_c near zero in the last window);
//   * the tap coefficients converge to the channel's linearised DDJ
//     coefficients t_c(k) = tau*(1-alpha)*ln(1-alpha)/alpha*alpha^(k+1),
//     expressed in TDC LSBs, within 0.7 LSB, with w0 the largest and
//     negative (the sign-LMS fits the median of a 1-LSB-quantised code, so
//     with little random jitter it settles near whole LSBs);
//   * the rms DDJ-cancelled error e_c is well below the rms TDC output;
//   * the rms phase of the recovered clock against the transmitter's bit
//     grid is smaller once the coefficients have converged than just after
//     CDR lock;
//   * the mechanisms all occur: transition-gated cancellation, idle
//     (no-transition) cycles, rising and falling edges through the XOR
//     inversion, coefficient steps up and down, integral-path frequency
//     tracking (a non-zero average DCO code).
`timescale 1ps/1fs
module tb_ddj_cdr_top;
  import ddj_cdr_pkg::*;

  localparam int    N_BITS = 120_000;
  localparam real   T_TX   = UI_PS * (1.0 - 500.0e-6);
  localparam real   T0     = 2000.0;
  localparam real   ALPHA  = 0.3;
  localparam real   RJ_UI  = 0.03;
  localparam int    HIST   = 24;
  localparam int    NT     = N_TAPS_DEF;

  logic rst_n = 1'b1, data_in = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic rec_clk, data_out, tc_edge_found, e_c_valid, lf_saturated;
  logic signed [$clog2(TDC_NFF):0] tc;
  logic signed [W_W_DEF + $clog2(NT) + 1:0] e_c;
  logic signed [W_W_DEF-1:0] w [NT];
  logic signed [W_W_DEF + $clog2(NT):0] t_est;
  logic signed [DCO_W_DEF-1:0] dco_code;

  ddj_cdr_top dut (
    .rst_n, .data_in, .rec_clk, .data_out, .tc, .tc_edge_found, .e_c, .e_c_valid,
    .w, .t_est, .dco_code, .lf_saturated
  );

  int checks = 0, failures = 0;
  bit tx_bits [];
  bit rx_bits [];
  real clk_phase [];
  int n_cyc = 0;

  // Mechanism counters.
  int n_cancel = 0, n_idle = 0, n_rise = 0, n_fall = 0, n_up = 0, n_dn = 0;
  int n_noedge = 0, n_lf_sat = 0;
  real sum_code = 0.0; int n_code = 0;
  real s_tc = 0.0, s_tc2 = 0.0, s_ec = 0.0, s_ec2 = 0.0; int n_err = 0;
  logic signed [W_W_DEF-1:0] w_prev [NT];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $itor($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return s - 6.0;
  endfunction

  initial begin
    #(T0 + real'(N_BITS) * UI_PS * 1.5);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transmitter and first-order channel.
  initial begin
    static logic [22:0] lfsr = 23'h7ACE11;
    real tau, t_edge, s;
    static bit prev = 1'b0;
    tau = -UI_PS / $ln(ALPHA);
    tx_bits = new[N_BITS];
    #100 rst_n = 1'b1;
    for (int n = 0; n < N_BITS; n++) begin
      bit b;
      b = lfsr[22] ^ lfsr[17];
      lfsr = {lfsr[21:0], b};
      tx_bits[n] = b;
      if (b != prev) begin
        s = 0.0;
        for (int m = 2; m <= HIST && n - m >= 0; m++) begin
          bit bm;
          bm = b ? tx_bits[n-m] : !tx_bits[n-m];
          if (bm) s += ALPHA ** (m - 1) - ALPHA ** m;
        end
        t_edge = T0 + real'(n) * T_TX + tau * $ln(2.0 - 2.0 * s) - tau * $ln(2.0)
                 + RJ_UI * UI_PS * gauss();
        if (t_edge > $realtime) #(t_edge - $realtime);
        data_in = b;
      end
      prev = b;
    end
  end

  // Per-cycle monitor.
  initial begin
    rx_bits   = new[N_BITS * 2];
    clk_phase = new[N_BITS * 2];
    for (int k = 0; k < NT; k++) w_prev[k] = '0;
  end

  always @(posedge rec_clk) begin
    real ph;
    if (n_cyc < N_BITS * 2) begin
      rx_bits[n_cyc] = data_out;
      ph = ($realtime - T0) / T_TX;
      clk_phase[n_cyc] = ph - $floor(ph);
    end
    n_cyc++;
    if (dut.u_ddj.trans) begin
      if (dut.data_out) n_rise++; else n_fall++;
      if (!dut.tc_edge_found) n_noedge++;
      if (n_cyc > N_BITS / 2) begin
        s_tc += $itor(tc); s_tc2 += $itor(tc) * $itor(tc);
      end
    end
    if (e_c_valid) n_cancel++;
    else if (n_cyc > 1000) n_idle++;
    for (int k = 0; k < NT; k++) begin
      if (w[k] > w_prev[k]) n_up++;
      if (w[k] < w_prev[k]) n_dn++;
      w_prev[k] = w[k];
    end
    if (lf_saturated) n_lf_sat++;
    if (n_cyc > N_BITS / 2) begin
      sum_code += $itor(dco_code); n_code++;
      if (e_c_valid) begin
        s_ec  += $itor(e_c) / 2048.0;    s_ec2 += ($itor(e_c) / 2048.0) ** 2;
        n_err++;
      end
    end
  end

  // rms of the clock phase over [c0, c1), unwrapped around its mean.
  function automatic real phase_rms(int c0, int c1);
    real ref_ph, m = 0.0, m2 = 0.0, d;
    ref_ph = clk_phase[c0];
    for (int c = c0; c < c1; c++) begin
      d = clk_phase[c] - ref_ph;
      if (d > 0.5) d -= 1.0;
      if (d < -0.5) d += 1.0;
      m += d; m2 += d * d;
    end
    m /= real'(c1 - c0);
    return $sqrt(m2 / real'(c1 - c0) - m * m);
  endfunction

  final begin end

  initial begin
    real tau, lin, exp_w [NT], wl, rms_tc, rms_ec, mean_ec, j_early, j_late;
    int best_d, best_err, errs, c_end;
    wait (rst_n);
    #(T0 + real'(N_BITS) * T_TX + 5000.0);
    c_end = (n_cyc < N_BITS * 2) ? n_cyc : N_BITS * 2;

    // Data: find the latency on the second half, then count errors there.
    best_d = 0; best_err = 1 << 30;
    for (int d = -20; d <= 40; d++) begin
      errs = 0;
      for (int c = c_end / 2; c < c_end - 50; c++)
        if (c - d >= 0 && c - d < N_BITS && rx_bits[c] != tx_bits[c - d]) errs++;
      if (errs < best_err) begin best_err = errs; best_d = d; end
    end
    $display("cycles %0d, data latency %0d cycles, bit errors %0d in %0d bits",
             c_end, best_d, best_err, c_end / 2 - 50);
    checks++;
    if (best_err != 0) begin failures++; $display("FAIL recovered data has errors"); end

    // Lock: mean DDJ-cancelled error near zero.
    mean_ec = s_ec / n_err;
    rms_ec  = $sqrt(s_ec2 / n_err - mean_ec * mean_ec);
    rms_tc  = $sqrt(s_tc2 / n_err - (s_tc / n_err) ** 2);
    $display("second half: mean e_c %0.3f LSB, rms e_c %0.3f LSB (%0.4f UI), rms tc %0.3f LSB (%0.4f UI)",
             mean_ec, rms_ec, rms_ec * 0.1, rms_tc, rms_tc * 0.1);
    checks++;
    if (mean_ec > 0.3 || mean_ec < -0.3) begin failures++; $display("FAIL CDR not locked"); end
    checks++;
    if (rms_ec > 0.7 * rms_tc) begin failures++; $display("FAIL DDJ not cancelled"); end

    // Coefficients against the linearised first-order channel.
    tau = -1.0 / $ln(ALPHA);     // in UI
    for (int k = 0; k < NT; k++) begin
      lin = tau * (1.0 - ALPHA) * $ln(1.0 - ALPHA) / ALPHA * (ALPHA ** (k + 1));
      exp_w[k] = lin / 0.1;
      wl = $itor(w[k]) / 2048.0;
      $display("w[%0d] = %0.3f LSB = %0.4f UI, channel %0.4f UI", k, wl, wl * 0.1, lin);
      checks++;
      if (wl < exp_w[k] - 0.7 || wl > exp_w[k] + 0.7) begin
        failures++; $display("FAIL coefficient %0d", k);
      end
    end
    checks++;
    if (!(w[0] < w[1] && w[0] < 0)) begin failures++; $display("FAIL coefficient ordering"); end

    // Recovered-clock jitter: after CDR lock vs after coefficient lock.
    j_early = phase_rms(1000, 4000);
    j_late  = phase_rms(c_end - 20000, c_end - 100);
    $display("recovered clock rms jitter: %0.4f UI (coefficients near 0), %0.4f UI (converged)",
             j_early, j_late);
    checks++;
    if (j_late >= j_early) begin failures++; $display("FAIL clock jitter not reduced"); end

    // Mechanisms.
    $display("cancel %0d idle %0d rising %0d falling %0d steps up %0d down %0d no-edge %0d lf-sat %0d mean code %0.2f",
             n_cancel, n_idle, n_rise, n_fall, n_up, n_dn, n_noedge, n_lf_sat, sum_code / n_code);
    checks++; if (n_cancel == 0) begin failures++; $display("FAIL no cancellation"); end
    checks++; if (n_idle == 0)   begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_rise == 0 || n_fall == 0) begin failures++; $display("FAIL edge directions"); end
    checks++; if (n_up == 0 || n_dn == 0) begin failures++; $display("FAIL coefficient steps"); end
    // 500 ppm = 0.2 ps per UI = 0.1 DCO code on average.
    checks++;
    if (sum_code / n_code < 0.02 || sum_code / n_code > 0.3) begin
      failures++; $display("FAIL integral path did not track the frequency offset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
