// tb_ddj_cdr_sweep - the CDR under the configurations of the tap-count and
// TDC-resolution sweeps, side by side on one shared input.
//
// One first-order channel (alpha = 0.3, 0.01 UI rms random jitter, 500 ppm
// frequency offset) feeds seven CDRs:
//   * 0.1 UI TDC (10 flip-flops) with 1, 2, 4 and 8 canceller taps, and
//   * a 4-tap canceller with 0.047, 0.18 and 0.3 UI TDCs (20, 6 and 4
//     flip-flops, each covering 0.9 UI).
// Loop gains scale with the TDC resolution (Kp, Ki proportional to it) and
// mu is kept near 0.00005 UI, a power of two of the TDC LSB.
//
// Checks: every configuration recovers the data without error once locked;
// its DDJ-cancelled rms error is below the rms TDC code; more taps do not
// increase the residual jitter at 0.1 UI (10 % margin); 8 taps are no worse
// than 1 tap; a finer TDC leaves less residual jitter.
`timescale 1ps/1fs
module tb_ddj_cdr_sweep;
  import ddj_cdr_pkg::*;

  localparam int  N_BITS = 120_000;
  localparam real T_TX   = UI_PS * (1.0 - 500.0e-6);

  logic rst_n = 1'b1, report = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
  end
  logic din_a;
  int checks = 0, failures = 0;

  prbs_channel #(.N_BITS(N_BITS), .T_TX_PS(T_TX), .ALPHA(0.3))  u_cha (.data_out(din_a));

  localparam int NC = 7;
  int  errs [NC], nchk [NC];
  real rtc [NC], rec [NC], w0 [NC];

  cdr_probe #(.N_TAPS(1)) p0 (.rst_n, .data_in(din_a), .report,
    .bit_errs(errs[0]), .n_checked(nchk[0]), .rms_tc_ui(rtc[0]), .rms_ec_ui(rec[0]), .w0_ui(w0[0]));
  cdr_probe #(.N_TAPS(2)) p1 (.rst_n, .data_in(din_a), .report,
    .bit_errs(errs[1]), .n_checked(nchk[1]), .rms_tc_ui(rtc[1]), .rms_ec_ui(rec[1]), .w0_ui(w0[1]));
  cdr_probe #(.N_TAPS(4)) p2 (.rst_n, .data_in(din_a), .report,
    .bit_errs(errs[2]), .n_checked(nchk[2]), .rms_tc_ui(rtc[2]), .rms_ec_ui(rec[2]), .w0_ui(w0[2]));
  cdr_probe #(.N_TAPS(8)) p3 (.rst_n, .data_in(din_a), .report,
    .bit_errs(errs[3]), .n_checked(nchk[3]), .rms_tc_ui(rtc[3]), .rms_ec_ui(rec[3]), .w0_ui(w0[3]));
  // 0.047 UI: 20 flip-flops, gains x0.47, mu = 2^-10 LSB = 0.000046 UI.
  cdr_probe #(.N_FF(20), .TDC_STEP(18.8), .MU_SHIFT(10), .KP_Q(5775), .KI_Q(121)) p4
    (.rst_n, .data_in(din_a), .report,
     .bit_errs(errs[4]), .n_checked(nchk[4]), .rms_tc_ui(rtc[4]), .rms_ec_ui(rec[4]), .w0_ui(w0[4]));
  // 0.18 UI: 6 flip-flops, gains x1.8, mu = 2^-12 LSB = 0.000044 UI.
  cdr_probe #(.N_FF(6), .TDC_STEP(72.0), .W_FRAC(12), .MU_SHIFT(12), .KP_Q(22118), .KI_Q(464)) p5
    (.rst_n, .data_in(din_a), .report,
     .bit_errs(errs[5]), .n_checked(nchk[5]), .rms_tc_ui(rtc[5]), .rms_ec_ui(rec[5]), .w0_ui(w0[5]));
  // 0.3 UI: 4 flip-flops, gains x3, mu = 2^-13 LSB = 0.000037 UI.
  cdr_probe #(.N_FF(4), .TDC_STEP(120.0), .W_FRAC(13), .W_W(18), .MU_SHIFT(13), .KP_Q(36864), .KI_Q(774)) p6
    (.rst_n, .data_in(din_a), .report,
     .bit_errs(errs[6]), .n_checked(nchk[6]), .rms_tc_ui(rtc[6]), .rms_ec_ui(rec[6]), .w0_ui(w0[6]));
  initial begin
    #(2000.0 + real'(N_BITS) * UI_PS * 1.5);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000.0 + real'(N_BITS) * T_TX + 5000.0);
    report = 1'b1;
    #1;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (errs[c] != 0 || nchk[c] < 1000) begin
        failures++; $display("FAIL config %0d: %0d errors in %0d bits", c, errs[c], nchk[c]);
      end
      checks++;
      if (!(rec[c] < rtc[c])) begin
        failures++; $display("FAIL config %0d: residual %0.4f not below input %0.4f UI", c, rec[c], rtc[c]);
      end
    end
    for (int c = 1; c < 4; c++) begin
      checks++;
      if (rec[c] > 1.1 * rec[c-1]) begin
        failures++; $display("FAIL more taps raised residual jitter (config %0d)", c);
      end
    end
    checks++;
    if (rec[3] > 1.05 * rec[0]) begin failures++; $display("FAIL 8 taps worse than 1"); end
    // Finer TDC resolution leaves less residual jitter (0.047 < 0.1 < 0.18 <= 0.3 UI).
    checks++;
    if (!(rec[4] < rec[2] && rec[2] < rec[5] && rec[5] <= rec[6] * 1.05)) begin
      failures++; $display("FAIL residual jitter does not follow the TDC resolution");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
