// ddj_fir - FIR filter of the DDJ canceller: estimates the data-dependent
// jitter of the current data edge from the symbols that preceded it.
//
// A delay line of retimed symbols holds a(n-1), a(n-2), ..., a(n-N_TAPS-1).
// Tap k looks at a(n-k-2), the symbol k+2 places before the current one
// a(n).  Because a rising edge after a given history shifts by the same
// amount as a falling edge after the inverted history, every stored symbol
// is XORed with a(n) (the edge direction) before it enters the filter, so a
// single filter serves both edge directions.  Each XOR output is one bit, so
// the "multiplier" of a tap is a gate that passes w_k or zero, and
// t_est = sum_k w_k * (a(n) ^ a(n-k-2)).
//
// trans flags a data transition (a(n) != a(n-1)); the estimate is only
// meaningful, and only used, in those cycles.
//
// Structure (delay line, XOR inversion, gated taps, adder) follows the
// published 4-tap canceller.  Widths are this design's: w_k are signed with
// the fixed-point format of ddj_cdr_pkg, and t_est is wide enough never to
// overflow.
//
// Timing: a_n is taken in every cycle; trans, tap_bits and t_est are
// combinational from a_n, the delay line and the coefficients.  The delay
// line shifts on every rising clock edge.  Asynchronous active-low reset
// clears the delay line.
`timescale 1ps/1fs
module ddj_fir
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_TAPS = N_TAPS_DEF,
  parameter int unsigned W_W    = W_W_DEF,
  parameter int unsigned SUM_W  = W_W + $clog2(N_TAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    a_n,
  input  logic signed [W_W-1:0]   w [N_TAPS],
  output logic                    trans,
  output logic [N_TAPS-1:0]       tap_bits,
  output logic signed [SUM_W-1:0] t_est
);

  // hist[0] = a(n-1), hist[j] = a(n-1-j)
  logic [N_TAPS:0] hist;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist <= '0;
    else        hist <= {hist[N_TAPS-1:0], a_n};
  end

  assign trans = a_n ^ hist[0];

  always_comb begin
    t_est = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      tap_bits[k] = a_n ^ hist[k+1];
      if (tap_bits[k]) t_est = t_est + SUM_W'(w[k]);
    end
  end

endmodule
