// coef_update - tap coefficient registers of the DDJ canceller and their
// sign-LMS update circuit.
//
// In every cycle with a data transition (en high) each coefficient moves by
//   w_k <= w_k + mu * sgn(e_c) * (a(n) ^ a(n-k-2)),
// where sgn(e_c) is +1, 0 or -1 and the XOR term is the tap bit of ddj_fir.
// Since both factors are a sign and a bit, no multiplier is needed: mu is a
// power of two, 2^-MU_SHIFT of a TDC LSB, so the step is the constant
// 2^(W_FRAC-MU_SHIFT) coefficient LSBs that is added or subtracted.
//
// The update rule is the published sign-LMS.  This design's own choices: mu
// is rounded to a power of two (2^-11 LSB = 0.0000488 UI for the published
// 0.00005 UI), the coefficients start at zero after reset, and each
// coefficient saturates at the ends of its W_W-bit range instead of
// wrapping.
//
// Timing: the new coefficients are visible one cycle after the update.
// Asynchronous active-low reset.
`timescale 1ps/1fs
module coef_update
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_TAPS   = N_TAPS_DEF,
  parameter int unsigned W_W      = W_W_DEF,
  parameter int unsigned W_FRAC   = W_FRAC_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  sign_t                 err_sgn,
  input  logic [N_TAPS-1:0]     tap_bits,
  output logic signed [W_W-1:0] w [N_TAPS]
);

  localparam logic signed [W_W:0] STEP  = (W_W+1)'(1) <<< (W_FRAC - MU_SHIFT);
  localparam logic signed [W_W:0] W_MAX = (W_W+1)'((1 << (W_W-1)) - 1);
  localparam logic signed [W_W:0] W_MIN = -W_MAX - 1;

  initial begin
    assert (MU_SHIFT <= W_FRAC) else $fatal(1, "MU_SHIFT must not exceed W_FRAC");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) w[k] <= '0;
    end else if (en && err_sgn != SGN_ZERO) begin
      for (int k = 0; k < N_TAPS; k++) begin
        if (tap_bits[k]) begin
          logic signed [W_W:0] nxt;
          nxt = (err_sgn == SGN_POS) ? (W_W+1)'(w[k]) + STEP : (W_W+1)'(w[k]) - STEP;
          if      (nxt > W_MAX) w[k] <= W_MAX[W_W-1:0];
          else if (nxt < W_MIN) w[k] <= W_MIN[W_W-1:0];
          else                  w[k] <= nxt[W_W-1:0];
        end
      end
    end
  end

endmodule
