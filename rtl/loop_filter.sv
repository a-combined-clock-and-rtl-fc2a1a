// loop_filter - proportional-integral digital loop filter of the CDR,
//   H(z) = Kp + Ki / (1 - z^-1).
//
// The integral path accumulates Ki * e_c and so tracks the frequency offset
// between the data and the DCO; the proportional path Kp * e_c corrects the
// phase and keeps the loop stable.  Their sum, rounded to an integer, is the
// DCO control code.  The published gains Kp = 3.0 and Ki = 0.063 (for a
// 25 MHz loop bandwidth and 60 degrees of phase margin at 2.5 Gb/s, with a
// 0.1 UI TDC and a 0.005 UI DCO) are the defaults.  They map one TDC LSB of
// phase error to DCO LSBs, so the input is in TDC LSBs with IN_FRAC fraction
// bits and the output is in DCO LSBs.
//
// This design's own choices: gains are fixed point with GAIN_FRAC fraction
// bits (Ki = 258/4096 = 0.06299), the integrator is ACC_W bits wide and
// saturates, the output is rounded half-up and saturates to OUT_W bits, and
// the integrator starts at zero after reset.
//
// Timing: code is registered and follows e_c by one cycle (one cycle of the
// three-cycle loop latency).  Asynchronous active-low reset.
`timescale 1ps/1fs
module loop_filter
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned IN_W      = 20,
  parameter int unsigned IN_FRAC   = W_FRAC_DEF,
  parameter int unsigned GAIN_FRAC = GAIN_FRAC_DEF,
  parameter int unsigned KP_Q      = KP_Q_DEF,
  parameter int unsigned KI_Q      = KI_Q_DEF,
  parameter int unsigned OUT_W     = DCO_W_DEF,
  parameter int unsigned ACC_W     = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  e_c,
  output logic signed [OUT_W-1:0] code,
  output logic                    saturated
);

  localparam int unsigned FRAC = IN_FRAC + GAIN_FRAC;
  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 << (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -OUT_MAX - 1;
  localparam logic signed [ACC_W-1:0] HALF    = ACC_W'(1) <<< (FRAC - 1);

  logic signed [ACC_W-1:0] integ_q;
  logic signed [ACC_W-1:0] e_ext, prop, inc, integ_sum, integ_d, total, rounded;
  logic signed [OUT_W-1:0] code_d;
  logic                    sat_d;

  always_comb begin
    e_ext     = ACC_W'(e_c);
    prop      = e_ext * $signed(ACC_W'(KP_Q));
    inc       = e_ext * $signed(ACC_W'(KI_Q));
    integ_sum = integ_q + inc;
    // Saturate the integrator on signed overflow.
    if (!integ_q[ACC_W-1] && !inc[ACC_W-1] && integ_sum[ACC_W-1])      integ_d = ACC_MAX;
    else if (integ_q[ACC_W-1] && inc[ACC_W-1] && !integ_sum[ACC_W-1])  integ_d = ACC_MIN;
    else                                                               integ_d = integ_sum;
    total   = prop + integ_d;
    rounded = (total + HALF) >>> FRAC;
    sat_d   = 1'b0;
    if (rounded > OUT_MAX) begin
      code_d = OUT_MAX[OUT_W-1:0];
      sat_d  = 1'b1;
    end else if (rounded < OUT_MIN) begin
      code_d = OUT_MIN[OUT_W-1:0];
      sat_d  = 1'b1;
    end else begin
      code_d = rounded[OUT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q   <= '0;
      code      <= '0;
      saturated <= 1'b0;
    end else begin
      integ_q   <= integ_d;
      code      <= code_d;
      saturated <= sat_d;
    end
  end

endmodule
