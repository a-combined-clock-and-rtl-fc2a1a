// tb_coef_update - self-checking test of the sign-LMS coefficient update.
// Random enable, error sign and tap bits drive the block; a reference model
// applies w_k += step * sgn * bit_k with saturation and is compared with the
// coefficients every cycle.  A coarse step (MU_SHIFT = 2) drives the
// coefficients into both saturation limits.
`timescale 1ps/1fs
module tb_coef_update;
  import ddj_cdr_pkg::*;
  localparam int N_TAPS   = 4;
  localparam int W_W      = 16;
  localparam int W_FRAC   = 11;
  localparam int MU_SHIFT = 2;
  localparam int STEP     = 1 << (W_FRAC - MU_SHIFT);
  localparam int W_MAX    = (1 << (W_W - 1)) - 1;
  localparam int W_MIN    = -(1 << (W_W - 1));

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  sign_t err_sgn = SGN_ZERO;
  logic [N_TAPS-1:0] tap_bits = '0;
  logic signed [W_W-1:0] w [N_TAPS];
  int ref_w [N_TAPS];
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;

  coef_update #(.N_TAPS(N_TAPS), .W_W(W_W), .W_FRAC(W_FRAC), .MU_SHIFT(MU_SHIFT))
    dut (.clk, .rst_n, .en, .err_sgn, .tap_bits, .w);

  always #200 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_TAPS; k++) ref_w[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int bias;
      // Phases: drift up, drift down, random.
      bias = (n < 7000) ? 80 : (n < 14000) ? 20 : 50;
      @(negedge clk);
      en       = ($urandom_range(0, 99) < 70);
      err_sgn  = ($urandom_range(0, 99) < 10) ? SGN_ZERO :
                 ($urandom_range(0, 99) < bias) ? SGN_POS : SGN_NEG;
      tap_bits = N_TAPS'($urandom);
      @(posedge clk);
      if (en && err_sgn != SGN_ZERO)
        for (int k = 0; k < N_TAPS; k++)
          if (tap_bits[k]) begin
            ref_w[k] += (err_sgn == SGN_POS) ? STEP : -STEP;
            if (ref_w[k] > W_MAX) begin ref_w[k] = W_MAX; n_sat_hi++; end
            if (ref_w[k] < W_MIN) begin ref_w[k] = W_MIN; n_sat_lo++; end
          end
      #1;
      for (int k = 0; k < N_TAPS; k++) begin
        checks++;
        if (int'(w[k]) != ref_w[k]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d w=%0d ref=%0d", n, k, w[k], ref_w[k]);
        end
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++; $display("FAIL saturation not reached (%0d/%0d)", n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
