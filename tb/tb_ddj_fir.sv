// tb_ddj_fir - self-checking test of the DDJ-canceller FIR filter.
// A random symbol stream and random coefficients drive the filter; a
// reference model kept in the test bench (its own symbol history) computes
// the transition flag, the XOR tap bits a(n)^a(n-k-2) and the sum of the
// coefficients whose bit is set, which are compared every cycle.
`timescale 1ps/1fs
module tb_ddj_fir;
  localparam int N_TAPS = 4;
  localparam int W_W    = 16;
  localparam int SUM_W  = W_W + $clog2(N_TAPS) + 1;

  logic clk = 1'b0, rst_n = 1'b1, a_n = 1'b0;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic signed [W_W-1:0] w [N_TAPS];
  logic trans;
  logic [N_TAPS-1:0] tap_bits;
  logic signed [SUM_W-1:0] t_est;
  int checks = 0, failures = 0;
  int n_trans = 0, n_fall = 0;

  bit sym [$];   // symbols in order, newest last

  ddj_fir #(.N_TAPS(N_TAPS), .W_W(W_W)) dut (.clk, .rst_n, .a_n, .w, .trans, .tap_bits, .t_est);

  always #200 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_TAPS; k++) w[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // After reset the history is all zeros.
    for (int j = 0; j < N_TAPS + 1; j++) sym.push_back(1'b0);
    for (int n = 0; n < 3000; n++) begin
      int   exp_sum;
      bit   exp_trans;
      bit   [N_TAPS-1:0] exp_bits;
      @(negedge clk);
      a_n = 1'($urandom);
      for (int k = 0; k < N_TAPS; k++) w[k] = W_W'($urandom_range(0, 65535));
      #1;
      exp_trans = a_n ^ sym[sym.size()-1];
      exp_sum = 0;
      for (int k = 0; k < N_TAPS; k++) begin
        exp_bits[k] = a_n ^ sym[sym.size()-2-k];
        if (exp_bits[k]) exp_sum += int'(w[k]);
      end
      checks++;
      if (trans !== exp_trans || tap_bits !== exp_bits || t_est !== SUM_W'(exp_sum)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d trans=%b/%b bits=%b/%b sum=%0d/%0d", n, trans, exp_trans,
                   tap_bits, exp_bits, t_est, exp_sum);
      end
      if (exp_trans) n_trans++;
      if (exp_trans && !a_n) n_fall++;
      sym.push_back(a_n);
      if (sym.size() > 16) void'(sym.pop_front());
    end
    checks++;
    if (n_trans == 0 || n_fall == 0) begin failures++; $display("FAIL no transitions seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
