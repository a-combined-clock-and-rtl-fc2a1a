// tb_ddj_canceller - self-checking test of the complete DDJ canceller.
// The TDC code tc is synthesised from a known linear DDJ model,
//   tc = round( sum_k W_TRUE[k] * (a(n)^a(n-k-2)) + noise ),
// for a random symbol stream, as a channel with first-order ISI would give.
// Every cycle a reference model (own history, own coefficients, own sign-LMS)
// predicts e_c, e_c_valid and the coefficients, which must match exactly.
// At the end the coefficients must lie within 0.45 LSB of W_TRUE (sign-LMS
// on a 1-LSB TDC code settles on a median, not a mean) and the rms of
// e_c must be well below the rms of tc.
`timescale 1ps/1fs
module tb_ddj_canceller;
  localparam int N_TAPS   = 4;
  localparam int TC_W     = 5;
  localparam int W_W      = 16;
  localparam int W_FRAC   = 11;
  localparam int MU_SHIFT = 6;
  localparam int STEP     = 1 << (W_FRAC - MU_SHIFT);
  localparam int SUM_W    = W_W + $clog2(N_TAPS) + 1;
  localparam int EC_W     = SUM_W + 1;
  localparam int N_CYC    = 40000;
  localparam real W_TRUE [N_TAPS] = '{-2.0, -0.6, -0.2, -0.05};

  logic clk = 1'b0, rst_n = 1'b1, a_n = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic signed [TC_W-1:0] tc = '0;
  logic signed [EC_W-1:0] e_c;
  logic e_c_valid;
  logic signed [W_W-1:0] w [N_TAPS];
  logic signed [SUM_W-1:0] t_est;

  int checks = 0, failures = 0;
  bit hist [N_TAPS+1];
  int ref_w [N_TAPS];
  int ref_e, exp_e;
  bit exp_v;
  real sum_tc2, sum_ec2;
  int n_stat, n_idle, n_up, n_dn;

  ddj_canceller #(.N_TAPS(N_TAPS), .TC_W(TC_W), .W_W(W_W), .W_FRAC(W_FRAC),
                  .MU_SHIFT(MU_SHIFT)) dut
    (.clk, .rst_n, .tc, .a_n, .e_c, .e_c_valid, .w, .t_est);

  always #200 clk = ~clk;

  initial begin
    #100_000_000;
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
    for (int k = 0; k < N_TAPS; k++) ref_w[k] = 0;
    for (int j = 0; j <= N_TAPS; j++) hist[j] = 1'b0;
    exp_e = 0; exp_v = 1'b0;
    sum_tc2 = 0.0; sum_ec2 = 0.0; n_stat = 0; n_idle = 0; n_up = 0; n_dn = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < N_CYC; n++) begin
      bit  trans;
      bit  [N_TAPS-1:0] bits;
      real ddj;
      int  tci, sum;
      @(negedge clk);
      // Registered outputs of the previous cycle.
      checks++;
      if (int'(e_c) != exp_e || e_c_valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d e_c=%0d exp=%0d v=%b/%b", n, e_c, exp_e, e_c_valid, exp_v);
      end
      for (int k = 0; k < N_TAPS; k++) begin
        checks++;
        if (int'(w[k]) != ref_w[k]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d w[%0d]=%0d ref=%0d", n, k, w[k], ref_w[k]);
        end
      end
      // New symbol and the TDC code of the edge in front of it.
      a_n = 1'($urandom);
      trans = a_n ^ hist[0];
      ddj = 0.0;
      for (int k = 0; k < N_TAPS; k++) begin
        bits[k] = a_n ^ hist[k+1];
        if (bits[k]) ddj += W_TRUE[k];
      end
      tci = trans ? int'($rtoi(ddj + 0.6 * gauss() + 100.5) - 100) : 0;
      if (tci > 4) tci = 4;
      if (tci < -4) tci = -4;
      tc = TC_W'(tci);
      // Reference canceller.
      sum = 0;
      for (int k = 0; k < N_TAPS; k++) if (bits[k]) sum += ref_w[k];
      ref_e = trans ? (tci * (1 << W_FRAC) - sum) : 0;
      exp_e = ref_e;
      exp_v = trans;
      if (trans && ref_e != 0) begin
        for (int k = 0; k < N_TAPS; k++) if (bits[k]) ref_w[k] += (ref_e > 0) ? STEP : -STEP;
        if (ref_e > 0) n_up++; else n_dn++;
      end
      if (!trans) n_idle++;
      if (trans && n > N_CYC / 2) begin
        sum_tc2 += $itor(tci) * $itor(tci);
        sum_ec2 += ($itor(ref_e) / 2048.0) * ($itor(ref_e) / 2048.0);
        n_stat++;
      end
      for (int j = N_TAPS; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = a_n;
    end
    // Convergence to the channel's DDJ coefficients.
    for (int k = 0; k < N_TAPS; k++) begin
      real wl;
      wl = $itor(w[k]) / 2048.0;
      checks++;
      if (wl < W_TRUE[k] - 0.45 || wl > W_TRUE[k] + 0.45) begin
        failures++;
        $display("FAIL w[%0d] = %0.3f LSB, expected about %0.3f", k, wl, W_TRUE[k]);
      end else $display("w[%0d] = %0.3f LSB (channel %0.3f)", k, wl, W_TRUE[k]);
    end
    $display("rms tc = %0.3f LSB, rms e_c = %0.3f LSB", $sqrt(sum_tc2 / n_stat), $sqrt(sum_ec2 / n_stat));
    checks++;
    if ($sqrt(sum_ec2 / n_stat) > 0.6 * $sqrt(sum_tc2 / n_stat)) begin
      failures++; $display("FAIL residual jitter not reduced");
    end
    checks++;
    if (n_idle == 0 || n_up == 0 || n_dn == 0) begin
      failures++; $display("FAIL idle/up/down not all exercised: %0d %0d %0d", n_idle, n_up, n_dn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
