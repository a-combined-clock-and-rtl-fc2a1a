// tb_ddj_fig2 - coefficient convergence of a 16-tap canceller on a strong
// first-order channel (alpha = 0.44), against the calculated coefficients.
//
// The canceller alone is driven, without the clock loop, as if by a fine
// TDC (LSB = 0.01 UI) sampling at a fixed phase.  For every data edge the
// exact half-level crossing time of a first-order channel is computed from
// the channel state y at the start of the new symbol:
//   rising  edge: t = tau * ln(2 * (1 - y))
//   falling edge: t = tau * ln(2 * y)
// with tau = -1 / ln(alpha) UI.  The reference time is the earliest edge
// (all earlier symbols equal to the new one), for which every XOR tap bit is
// 0.  The TDC code is tc = round(-(t - t_ref) / LSB + RJ), with 0.01 UI rms
// random jitter, so later edges give negative codes.
//
// Replacing ln(1 - y) by its secant between y = 0 and y = alpha gives the
// linear model the canceller is built on, and its coefficients
//   w_k = tau * ln(1 - alpha) / alpha * (1 - alpha) * alpha^(k+1)   [UI]
// (about -0.395, -0.174, -0.077, -0.034 UI, ...).  The sign-LMS result is a
// best linear fit of the exact curve, not the secant, so the check allows
// 0.02 UI on each tap.  It also checks that the taps fall monotonically in
// size, that the rms of e_c is well below that of tc, and that the taps
// beyond the fourth are all small.
`timescale 1ps/1fs
module tb_ddj_fig2;
  localparam int    N_TAPS   = 16;
  localparam int    TC_W     = 8;
  localparam int    W_W      = 16;
  localparam int    W_FRAC   = 8;
  localparam int    MU_SHIFT = 5;
  localparam int    SUM_W    = W_W + $clog2(N_TAPS) + 1;
  localparam int    EC_W     = SUM_W + 1;
  localparam int    N_CYC    = 300000;
  localparam real   ALPHA    = 0.44;
  localparam real   LSB_UI   = 0.01;
  localparam real   RJ_LSB   = 1.0;
  localparam real   TOL_UI   = 0.02;

  logic clk = 1'b0, rst_n = 1'b1, a_n = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic signed [TC_W-1:0]  tc = '0;
  logic signed [EC_W-1:0]  e_c;
  logic                    e_c_valid;
  logic signed [W_W-1:0]   w [N_TAPS];
  logic signed [SUM_W-1:0] t_est;

  int  checks = 0, failures = 0;
  real tau, t_ref, y, calc [N_TAPS];
  real sum_tc, sum_tc2, sum_ec2;
  int  n_stat, n_rise, n_fall, n_valid;
  bit  prev_a;

  ddj_canceller #(.N_TAPS(N_TAPS), .TC_W(TC_W), .W_W(W_W), .W_FRAC(W_FRAC),
                  .MU_SHIFT(MU_SHIFT)) dut
    (.clk, .rst_n, .tc, .a_n, .e_c, .e_c_valid, .w, .t_est);

  always #200 clk = ~clk;

  initial begin
    #(real'(N_CYC + 1000) * 400.0);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $itor($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return s - 6.0;
  endfunction

  initial begin
    tau   = -1.0 / $ln(ALPHA);
    t_ref = tau * $ln(2.0 * (1.0 - ALPHA));
    for (int k = 0; k < N_TAPS; k++)
      calc[k] = tau * $ln(1.0 - ALPHA) / ALPHA * (1.0 - ALPHA) * (ALPHA ** (k + 1));
    y = 0.0; prev_a = 1'b0;
    sum_tc = 0.0; sum_tc2 = 0.0; sum_ec2 = 0.0;
    n_stat = 0; n_rise = 0; n_fall = 0; n_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N_CYC; n++) begin
      bit  a;
      real t;
      int  tci;
      @(negedge clk);
      if (e_c_valid) begin
        n_valid++;
        if (n > N_CYC / 2) sum_ec2 += ($itor(e_c) / 256.0) * ($itor(e_c) / 256.0);
      end
      a   = 1'($urandom);
      tci = 0;
      if (a != prev_a) begin
        t   = a ? tau * $ln(2.0 * (1.0 - y)) : tau * $ln(2.0 * y);
        tci = $rtoi(-(t - t_ref) / LSB_UI + RJ_LSB * gauss() + 1000.5) - 1000;
        if (a) n_rise++; else n_fall++;
        if (n > N_CYC / 2) begin
          sum_tc  += $itor(tci);
          sum_tc2 += $itor(tci) * $itor(tci);
          n_stat++;
        end
      end
      a_n = a;
      tc  = TC_W'(tci);
      // Channel state at the start of the next symbol.
      y = (a ? 1.0 : 0.0) + (y - (a ? 1.0 : 0.0)) * ALPHA;
      prev_a = a;
    end
    @(negedge clk);
    for (int k = 0; k < N_TAPS; k++) begin
      real wu;
      wu = $itor(w[k]) / 256.0 * LSB_UI;
      checks++;
      if (wu < calc[k] - TOL_UI || wu > calc[k] + TOL_UI) begin
        failures++;
        $display("FAIL w[%0d] = %0.4f UI, calculated %0.4f UI", k, wu, calc[k]);
      end else $display("w[%0d] = %0.4f UI (calculated %0.4f UI)", k, wu, calc[k]);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (!(w[k] < w[k+1])) begin
        failures++; $display("FAIL taps %0d and %0d not ordered by size", k, k + 1);
      end
    end
    for (int k = 4; k < N_TAPS; k++) begin
      checks++;
      if ($itor(w[k]) / 256.0 * LSB_UI < -0.03 || $itor(w[k]) / 256.0 * LSB_UI > 0.03) begin
        failures++; $display("FAIL w[%0d] larger than 0.03 UI", k);
      end
    end
    begin
      real rms_tc, rms_ec, mean_tc;
      mean_tc = sum_tc / n_stat;
      rms_tc  = $sqrt(sum_tc2 / n_stat - mean_tc * mean_tc) * LSB_UI;
      rms_ec  = $sqrt(sum_ec2 / n_stat) * LSB_UI;
      $display("DDJ rms %0.4f UI before, %0.4f UI after cancellation", rms_tc, rms_ec);
      checks++;
      if (rms_ec > 0.25 * rms_tc) begin
        failures++; $display("FAIL residual not reduced enough");
      end
    end
    checks++;
    if (n_rise == 0 || n_fall == 0 || n_valid == 0) begin
      failures++; $display("FAIL rising/falling/valid edges not all seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
