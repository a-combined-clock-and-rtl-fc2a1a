// ddj_canceller - adaptive data-dependent-jitter canceller.
//
// The TDC phase error tc of a data edge contains, besides the real clock
// phase error, a shift that depends on the preceding symbols (DDJ caused by
// inter-symbol interference).  ddj_fir estimates that shift from the retimed
// symbols and this block subtracts it, leaving the DDJ-free phase error
//   e_c = tc - t_est
// that drives the loop filter.  The same e_c, through its sign, adapts the
// FIR coefficients (coef_update, sign-LMS), so the canceller learns an
// unknown channel while the CDR runs.
//
// The canceller works only in cycles with a data transition (a(n) differs
// from a(n-1)); in the other cycles there is no edge to measure, e_c is 0,
// e_c_valid is low and the coefficients hold.
//
// The structure (FIR on retimed symbols, subtraction from the TDC output,
// sign-LMS driven by e_c, transition gating) follows the published design.
// Output registering and the fixed-point format are this design's: e_c has
// W_FRAC fractional bits of a TDC LSB.
//
// Timing: tc and a_n belonging to the same edge enter in the same cycle;
// e_c and e_c_valid are registered and appear one cycle later (one cycle of
// the three-cycle loop latency).  Asynchronous active-low reset.
`timescale 1ps/1fs
module ddj_canceller
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_TAPS   = N_TAPS_DEF,
  parameter int unsigned TC_W     = $clog2(TDC_NFF) + 1,
  parameter int unsigned W_W      = W_W_DEF,
  parameter int unsigned W_FRAC   = W_FRAC_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF,
  parameter int unsigned SUM_W    = W_W + $clog2(N_TAPS) + 1,
  parameter int unsigned EC_W     = ((SUM_W > TC_W + W_FRAC) ? SUM_W : TC_W + W_FRAC) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [TC_W-1:0]  tc,
  input  logic                    a_n,
  output logic signed [EC_W-1:0]  e_c,
  output logic                    e_c_valid,
  output logic signed [W_W-1:0]   w [N_TAPS],
  output logic signed [SUM_W-1:0] t_est
);

  logic                   trans;
  logic [N_TAPS-1:0]      tap_bits;
  logic signed [EC_W-1:0] tc_ext;
  logic signed [EC_W-1:0] e_d;
  sign_t                  e_sgn;

  ddj_fir #(
    .N_TAPS (N_TAPS),
    .W_W    (W_W),
    .SUM_W  (SUM_W)
  ) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .a_n      (a_n),
    .w        (w),
    .trans    (trans),
    .tap_bits (tap_bits),
    .t_est    (t_est)
  );

  // Align the integer TDC code with the coefficient fraction bits.
  assign tc_ext = EC_W'(tc) <<< W_FRAC;
  assign e_d    = trans ? (tc_ext - EC_W'(t_est)) : '0;

  always_comb begin
    if      (e_d > 0) e_sgn = SGN_POS;
    else if (e_d < 0) e_sgn = SGN_NEG;
    else              e_sgn = SGN_ZERO;
  end

  coef_update #(
    .N_TAPS   (N_TAPS),
    .W_W      (W_W),
    .W_FRAC   (W_FRAC),
    .MU_SHIFT (MU_SHIFT)
  ) u_upd (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (trans),
    .err_sgn  (e_sgn),
    .tap_bits (tap_bits),
    .w        (w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_c       <= '0;
      e_c_valid <= 1'b0;
    end else begin
      e_c       <= e_d;
      e_c_valid <= trans;
    end
  end

endmodule
