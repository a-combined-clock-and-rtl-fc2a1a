// ddj_cdr_pkg - shared constants and types of the all-digital CDR with
// adaptive data-dependent-jitter (DDJ) cancellation.
//
// The numbers below are the design point of the CDR: 2.5 Gb/s data (one unit
// interval, UI, is 400 ps), a 10-flip-flop TDC with 0.1 UI resolution covering
// 0.9 UI, a 4-tap DDJ canceller adapted by sign-LMS with mu = 0.00005 UI, a
// proportional-integral loop filter with Kp = 3.0 and Ki = 0.063, and a DCO
// with 0.005 UI resolution.  These are the published design values.
//
// The fixed-point formats are this design's own choice:
//   * phase errors and coefficients are counted in TDC LSBs (0.1 UI), with
//     W_FRAC fractional bits; 2^-11 LSB = 4.9e-5 UI is the closest power of
//     two to mu = 0.00005 UI, so one sign-LMS step is one coefficient LSB;
//   * loop-filter gains are unsigned fixed point with GAIN_FRAC fraction
//     bits: Kp = 3.0 -> 12288, Ki = 0.063 -> 258 (= 0.06299);
//   * the DCO code is signed, 0 is the centre frequency and a larger code
//     gives a shorter period.
`timescale 1ps/1fs
package ddj_cdr_pkg;

  // Data rate and analog resolutions, in picoseconds.
  localparam real UI_PS        = 400.0;   // 2.5 Gb/s
  localparam real TDC_STEP_PS  = 40.0;    // 0.1 UI
  localparam real DCO_STEP_PS  = 2.0;     // 0.005 UI
  localparam real TDC_DNL_LSB  = 0.25;    // +/-0.25 LSB delay mismatch

  // Phase detector (TDC).
  localparam int unsigned TDC_NFF = 10;   // sampling flip-flops, 0.9 UI range

  // DDJ canceller.
  localparam int unsigned N_TAPS_DEF = 4;
  localparam int unsigned W_W_DEF    = 16;  // coefficient width (sign + 4 int + 11 frac)
  localparam int unsigned W_FRAC_DEF = 11;  // fractional bits of a TDC LSB
  localparam int unsigned MU_SHIFT_DEF = 11; // mu = 2^-11 TDC LSB ~ 0.00005 UI

  // Loop filter.
  localparam int unsigned GAIN_FRAC_DEF = 12;
  localparam int unsigned KP_Q_DEF      = 12288; // 3.0
  localparam int unsigned KI_Q_DEF      = 258;   // 0.063
  localparam int unsigned DCO_W_DEF     = 10;    // signed DCO control word

  // Three-valued sign used by the sign-LMS update.
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,
    SGN_POS  = 2'b01,
    SGN_NEG  = 2'b10
  } sign_t;

endpackage
