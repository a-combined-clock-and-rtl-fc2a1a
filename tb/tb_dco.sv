// tb_dco - self-checking test of the behavioural DCO model.
// Holds the oscillator off, enables it, and for a set of control codes
// measures the period between rising edges, which must equal
// 400 ps - code * 2 ps (0.005 UI per code) for an ideal oscillator
// (RJ_PS = 0).  A second, jittery instance with the default 4 ps rms must
// keep the same average period and show an rms edge displacement near
// 4 ps (period jitter of sqrt(2) * 4 ps).
`timescale 1ps/1fs
module tb_dco;
  localparam int CODE_W = 10;
  logic enable = 1'b0;
  logic signed [CODE_W-1:0] code = '0;
  logic clk_out;
  int checks = 0, failures = 0;
  realtime t_last, period;

  logic clk_j;
  dco #(.CODE_W(CODE_W), .RJ_PS(0.0)) dut (.enable, .code, .clk_out);
  dco #(.CODE_W(CODE_W)) dut_j (.enable, .code, .clk_out(clk_j));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [6] = '{0, 1, -1, 25, -100, 150};
    #1000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL clock runs while disabled"); end
    enable = 1'b1;
    foreach (codes[i]) begin
      code = CODE_W'(codes[i]);
      @(posedge clk_out);    // period set at this edge uses the new code
      @(posedge clk_out); t_last = $realtime;
      @(posedge clk_out); period = $realtime - t_last;
      checks++;
      if (period < 400.0 - 2.0 * codes[i] - 0.01 || period > 400.0 - 2.0 * codes[i] + 0.01) begin
        failures++;
        $display("FAIL code %0d period %0.3f ps", codes[i], period);
      end
    end
    // Jittery instance: period statistics over 4000 cycles at code 0.
    code = '0;
    @(posedge clk_j); @(posedge clk_j);
    begin
      real t0, tp, p, s1 = 0.0, s2 = 0.0, mean, rms;
      t0 = $realtime; tp = t0;
      for (int n = 0; n < 4000; n++) begin
        @(posedge clk_j);
        p = $realtime - tp; tp = $realtime;
        s1 += p; s2 += p * p;
      end
      mean = s1 / 4000.0;
      rms  = $sqrt(s2 / 4000.0 - mean * mean);
      $display("jittery DCO: mean period %0.3f ps, period jitter %0.3f ps rms", mean, rms);
      checks++;
      if (mean < 399.5 || mean > 400.5) begin failures++; $display("FAIL mean period"); end
      checks++;
      if (rms < 0.8 * 5.657 || rms > 1.2 * 5.657) begin failures++; $display("FAIL jitter"); end
    end
    enable = 1'b0;
    #1000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL clock did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
