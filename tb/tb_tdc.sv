// tb_tdc - self-checking test of the TDC sampling flip-flops and decoder.
// Drives the tap vector directly with a data edge placed at every position
// of the window, for rising and falling edges, with no edge and with two
// edges, and compares tc/edge_found one cycle after sampling with the
// expected position minus the window centre.
`timescale 1ps/1fs
module tb_tdc;
  localparam int N_FF = 10;
  localparam int TC_W = $clog2(N_FF) + 1;

  logic clk = 1'b0, rst_n = 1'b1;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic [N_FF-1:0] taps = '0;
  logic signed [TC_W-1:0] tc;
  logic edge_found;
  int checks = 0, failures = 0;

  tdc #(.N_FF(N_FF)) dut (.clk, .rst_n, .taps, .tc, .edge_found);

  always #200 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a tap vector, sample it on one rising edge, check after the next.
  task automatic apply(input logic [N_FF-1:0] v, input int exp_tc, input logic exp_found);
    @(negedge clk) taps = v;
    @(posedge clk);            // sampled here
    @(negedge clk);
    // the decoded result must not be visible yet: it is registered
    @(posedge clk); #1;
    checks++;
    if (tc !== TC_W'(exp_tc) || edge_found !== exp_found) begin
      failures++;
      $display("FAIL taps=%b tc=%0d found=%b exp %0d/%b", v, tc, edge_found, exp_tc, exp_found);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Edge between tap p and p+1: taps 0..p hold the new value.
    for (int p = 0; p <= N_FF - 2; p++) begin
      logic [N_FF-1:0] v;
      v = '0;
      for (int i = 0; i <= p; i++) v[i] = 1'b1;
      apply(v, p - (N_FF - 2) / 2, 1'b1);   // rising data edge
      apply(~v, p - (N_FF - 2) / 2, 1'b1);  // falling data edge
    end
    apply('0, 0, 1'b0);
    apply('1, 0, 1'b0);
    // Two edges: positions 2 and 7, the lower position wins.
    apply(10'b0011111000, 2 - 4, 1'b1);
    // Latency: change the taps and check the old value stays one cycle.
    @(negedge clk) taps = 10'b0000011111;   // edge at p=4 -> 0
    @(posedge clk); #1;
    @(negedge clk) taps = 10'b0111111111;   // edge at p=8 -> +4
    @(posedge clk); #1;
    checks++;
    if (tc !== 0) begin failures++; $display("FAIL latency: tc=%0d", tc); end
    @(posedge clk); #1;
    checks++;
    if (tc !== 4) begin failures++; $display("FAIL latency: tc=%0d", tc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
