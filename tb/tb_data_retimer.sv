// tb_data_retimer - self-checking test of the falling-edge data retimer.
// Random data changes right after each rising clock edge (so it is stable at
// the falling edge); a second value is forced just after each falling edge
// to prove the falling edge, not the rising one, takes the sample.  The
// output must show each falling-edge sample after the next rising edge.
`timescale 1ps/1fs
module tb_data_retimer;
  logic clk = 1'b0, rst_n = 1'b1, din = 1'b0, dout;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic expected;

  data_retimer dut (.clk, .rst_n, .din, .dout);

  always #200 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout !== 1'b0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #10;
      din = 1'($urandom);
      expected = din;              // value present at the falling edge
      @(negedge clk); #10;
      din = ~expected;             // changes after the falling edge
      @(posedge clk); #1;
      checks++;
      if (dout !== expected) begin
        failures++;
        $display("FAIL n=%0d dout=%b exp=%b", n, dout, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
