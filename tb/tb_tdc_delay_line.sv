// tb_tdc_delay_line - self-checking test of the behavioural TDC buffer chain.
// Sends rising and falling edges and a short pulse into the chain and
// checks that each tap switches at the sum of the nominal stage delays with
// the alternating +/-DNL pattern, computed here independently.
`timescale 1ps/1fs
module tb_tdc_delay_line;
  localparam int  N    = 10;
  localparam real STEP = 40.0;
  localparam real DNL  = 0.25;

  logic din = 1'b0;
  logic [N-1:0] taps;
  realtime t_change [N];
  int checks = 0, failures = 0;

  tdc_delay_line #(.N_TAPS(N), .STEP_PS(STEP), .DNL_LSB(DNL)) dut (.din, .taps);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic v);
    realtime t0, exp_t;
    bit seen [N];
    #1000 din = v;
    t0 = $realtime;
    foreach (seen[i]) seen[i] = 1'b0;
    // Poll every 1 ps and note when each tap takes the new value.
    for (int s = 0; s < 1000; s++) begin
      for (int i = 0; i < N; i++)
        if (!seen[i] && taps[i] == v) begin seen[i] = 1'b1; t_change[i] = $realtime; end
      #1;
    end
    exp_t = 0.0;
    for (int i = 0; i < N; i++) begin
      if (i > 0) exp_t += (i % 2 == 1) ? STEP * (1.0 + DNL) : STEP * (1.0 - DNL);
      checks++;
      if (taps[i] !== v || (t_change[i] - t0) < exp_t - 1.01 || (t_change[i] - t0) > exp_t + 1.01) begin
        failures++;
        $display("FAIL tap %0d: value %b, delay %0.3f ps, expected %0.3f ps", i, taps[i], t_change[i] - t0, exp_t);
      end
    end
  endtask

  initial begin
    #10;
    send(1'b1);
    send(1'b0);
    send(1'b1);
    // A 100 ps pulse (0.25 UI) must reach the last tap intact.
    #1000 din = 1'b0;
    #100  din = 1'b1;
    begin
      bit went_low = 1'b0;
      for (int s = 0; s < 600; s++) begin
        if (taps[N-1] == 1'b0) went_low = 1'b1;
        #1;
      end
      checks++;
      if (!went_low || taps[N-1] !== 1'b1) begin
        failures++; $display("FAIL pulse did not propagate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
