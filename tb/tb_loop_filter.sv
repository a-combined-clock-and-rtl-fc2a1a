// tb_loop_filter - self-checking test of the PI loop filter.
// Random phase errors drive the filter with the published gains; a reference
// model in 64-bit integers keeps the integrator and forms
// round((Kp*e + acc) / 2^FRAC), compared with the code one cycle later.
// A constant error then checks the step response (Kp + n*Ki) and drives the
// output into saturation in both directions.
`timescale 1ps/1fs
module tb_loop_filter;
  localparam int IN_W = 20, IN_FRAC = 11, GAIN_FRAC = 12, OUT_W = 10;
  localparam longint KP = 12288, KI = 258;
  localparam int FRAC = IN_FRAC + GAIN_FRAC;

  logic clk = 1'b0, rst_n = 1'b1;
  // Asynchronous reset: the flip-flops reset on the falling edge of rst_n.
  initial #1 rst_n = 1'b0;
  logic signed [IN_W-1:0] e_c = '0;
  logic signed [OUT_W-1:0] code;
  logic saturated;
  int checks = 0, failures = 0, n_sat = 0;
  longint acc, total, exp_code;

  loop_filter #(.IN_W(IN_W), .IN_FRAC(IN_FRAC), .GAIN_FRAC(GAIN_FRAC),
                .KP_Q(KP), .KI_Q(KI), .OUT_W(OUT_W)) dut
    (.clk, .rst_n, .e_c, .code, .saturated);

  always #200 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input longint e);
    bit exp_sat;
    @(negedge clk) e_c = IN_W'(e);
    acc   = acc + KI * e;
    total = KP * e + acc;
    // floor((total + half) / 2^FRAC)
    exp_code = (total + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    exp_sat = 1'b0;
    if (exp_code > 511)  begin exp_code = 511;  exp_sat = 1'b1; end
    if (exp_code < -512) begin exp_code = -512; exp_sat = 1'b1; end
    @(posedge clk); #1;
    checks++;
    if (longint'(code) != exp_code || saturated !== exp_sat) begin
      failures++;
      if (failures < 10) $display("FAIL e=%0d code=%0d exp=%0d sat=%b", e, code, exp_code, saturated);
    end
    if (exp_sat) n_sat++;
  endtask

  initial begin
    acc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Step response: 1 TDC LSB of error gives Kp + n*Ki codes.
    step(2048);   // 3.063 -> 3
    checks++;
    if (code != 3) begin failures++; $display("FAIL step response %0d", code); end
    for (int n = 0; n < 100; n++) step(2048);
    // 101 cycles: 3 + 101*0.06299 = 9.36 -> 9
    checks++;
    if (code != 9) begin failures++; $display("FAIL integral response %0d", code); end
    // Random errors in the range of a DDJ-cancelled TDC code (+/-5 LSB).
    for (int n = 0; n < 5000; n++) step(longint'($urandom_range(0, 20480)) - 10240);
    // Drive to the upper and lower saturation limits.
    for (int n = 0; n < 3000; n++) step(8192);
    for (int n = 0; n < 6000; n++) step(-8192);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
