// tdc - time-to-digital converter used as the phase detector of the CDR.
//
// The delayed copies of the data (taps, from the buffer chain) are sampled
// by N_FF flip-flops on the rising edge of the recovered clock.  Neighbouring
// samples are XORed: the XOR that is set marks where the data edge lay inside
// the detection window.  The decoder turns that position p (0 .. N_FF-2) into
// a signed phase error tc = p - (N_FF-2)/2, so an edge in the middle of the
// window gives zero, an early edge (one that has travelled further down the
// chain) a positive value and a late edge a negative one.  With the default
// 10 flip-flops the window is 0.9 UI and tc runs from -4 to +4 LSB of 0.1 UI.
//
// The sampling flip-flops, XORs, decoder and sign convention follow the
// published TDC.  The decoder's rules are this design's: if more than one
// XOR is set the lowest position wins (a priority encoder), and if none is
// set (no edge in the window) tc is 0 and edge_found is low.
//
// Timing: taps sampled at rising edge k, tc/edge_found valid after rising
// edge k+1 (one cycle of the three-cycle loop latency).  Asynchronous
// active-low reset.
`timescale 1ps/1fs
module tdc
  import ddj_cdr_pkg::*;
#(
  parameter int unsigned N_FF = TDC_NFF,
  parameter int unsigned TC_W = $clog2(N_FF) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_FF-1:0]        taps,
  output logic signed [TC_W-1:0] tc,
  output logic                   edge_found
);

  localparam int CENTER = (N_FF - 2) / 2;

  logic [N_FF-1:0] samp_q;
  logic [N_FF-2:0] edge_vec;
  logic signed [TC_W-1:0] tc_d;
  logic                   found_d;

  // Sampling flip-flops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samp_q <= '0;
    else        samp_q <= taps;
  end

  // Edge detection between neighbouring samples.
  assign edge_vec = samp_q[N_FF-2:0] ^ samp_q[N_FF-1:1];

  // Decoder: position of the lowest set XOR, re-centred.
  always_comb begin
    tc_d    = '0;
    found_d = 1'b0;
    for (int p = N_FF - 2; p >= 0; p--) begin
      if (edge_vec[p]) begin
        tc_d    = TC_W'(p - CENTER);
        found_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc         <= '0;
      edge_found <= 1'b0;
    end else begin
      tc         <= tc_d;
      edge_found <= found_d;
    end
  end

endmodule
