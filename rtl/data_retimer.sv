// data_retimer - recovers the data symbols.
//
// The rising edge of the recovered clock is locked to the data edges, so the
// data is sampled on the falling edge, half a UI later, in the middle of the
// eye.  The falling-edge sample is then moved into the rising-edge domain by
// a second flip-flop so that the rest of the CDR (the DDJ canceller and the
// data output) works on one clock edge.
//
// Falling-edge sampling follows the published CDR; the re-timing flip-flop is
// this design's choice.
//
// Timing: the symbol that follows the data edge measured by the TDC at rising
// edge k is sampled at the falling edge k+1/2 and appears on dout after rising
// edge k+1, in the same cycle as that edge's TDC result.  Asynchronous
// active-low reset.
`timescale 1ps/1fs
module data_retimer (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  logic neg_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) neg_q <= 1'b0;
    else        neg_q <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= neg_q;
  end

endmodule
