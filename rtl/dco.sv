// dco - behavioural model (not synthesizable) of the digitally controlled
// oscillator that produces the recovered clock.
//
// The oscillator is the one analog block of the CDR.  The model produces a
// square wave whose period is
//   T = T_CENTER_PS - code * STEP_PS,
// re-evaluated at every rising edge, so a positive code speeds the clock up.
// STEP_PS = 2 ps is the 0.005 UI resolution of the design point and
// T_CENTER_PS = 400 ps its 2.5 Gb/s unit interval.  The period is clamped to
// at least T_MIN_PS.  While enable is low the output rests at 0; the first
// rising edge comes half a period after enable rises.
//
// Random jitter: each rising edge is displaced from its ideal time by a
// Gaussian amount of RJ_PS rms (edge jitter, it does not accumulate), with
// 4 ps = 0.01 UI rms as the default, the random jitter assumed for the DCO
// at the design point.  The Gaussian is approximated by the sum of twelve
// uniform numbers; the falling edge stays half an ideal period after the
// ideal rising edge.  Set RJ_PS = 0 for an ideal oscillator.
`timescale 1ps/1fs
module dco
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned CODE_W      = DCO_W_DEF,
  parameter real         T_CENTER_PS = UI_PS,
  parameter real         STEP_PS     = DCO_STEP_PS,
  parameter real         T_MIN_PS    = 100.0,
  parameter real         RJ_PS       = 0.01 * UI_PS
) (
  input  logic                     enable,
  input  logic signed [CODE_W-1:0] code,
  output logic                     clk_out
);

  real half_ps;
  real jit_ps;   // displacement of the coming rising edge

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $itor($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return s - 6.0;
  endfunction

  initial clk_out = 1'b0;

  always begin
    if (!enable) begin
      clk_out = 1'b0;
      @(posedge enable);
    end
    half_ps = (T_CENTER_PS - $itor(code) * STEP_PS) / 2.0;
    if (half_ps < T_MIN_PS / 2.0) half_ps = T_MIN_PS / 2.0;
    jit_ps = RJ_PS * gauss();
    if (jit_ps >  0.4 * half_ps) jit_ps =  0.4 * half_ps;
    if (jit_ps < -0.4 * half_ps) jit_ps = -0.4 * half_ps;
    #(half_ps + jit_ps) clk_out = 1'b1;
    #(half_ps - jit_ps) clk_out = 1'b0;
  end

endmodule
