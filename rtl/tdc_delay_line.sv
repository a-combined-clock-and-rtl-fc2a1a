// tdc_delay_line - behavioural model (not synthesizable) of the buffer chain
// in front of the TDC sampling flip-flops.
//
// Tap 0 is the incoming data itself; tap i is tap i-1 delayed by one buffer.
// A buffer nominally delays by one TDC resolution step (0.1 UI = 40 ps).
// Its mismatch is modelled as a fixed differential nonlinearity: odd stages
// are DNL_LSB longer and even stages DNL_LSB shorter than nominal, which
// gives the +/-0.25 LSB DNL of the design point while keeping the total
// chain length (and hence the 0.9 UI detection range) unchanged for an even
// number of stages.  The alternating pattern is this model's choice.
//
// Interface: din (serial data), taps[N_TAPS-1:0] (delayed copies).  Each
// buffer is an inertial delay, so pulses shorter than one stage (40 ps)
// would be swallowed; data pulses are always far longer.
`timescale 1ps/1fs
module tdc_delay_line
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_TAPS  = TDC_NFF,
  parameter real         STEP_PS = TDC_STEP_PS,
  parameter real         DNL_LSB = TDC_DNL_LSB
) (
  input  logic              din,
  output logic [N_TAPS-1:0] taps
);

  assign taps[0] = din;

  for (genvar i = 1; i < N_TAPS; i++) begin : g_stage
    localparam real STAGE_PS = STEP_PS * (1.0 + ((i % 2 == 1) ? DNL_LSB : -DNL_LSB));
    assign #(STAGE_PS) taps[i] = taps[i-1];
  end

endmodule
