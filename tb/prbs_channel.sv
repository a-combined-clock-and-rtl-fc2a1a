// prbs_channel - test-bench model of a transmitter and a first-order channel.
//
// Sends a 2^23-1 PRBS (x^23 + x^18 + 1) with bit period T_TX_PS, starting
// at T0_PS.  Every data edge is moved to the half-level crossing time of a
// first-order (RC) channel with alpha = exp(-T/tau), computed exactly from
// the HIST preceding symbols:
//   t_c = tau * ln(2 - 2 * sum_{m>=2} b(n-m) * (alpha^(m-1) - alpha^m)),
// with b = a for a rising and b = 1-a for a falling edge, minus the constant
// tau*ln(2), plus Gaussian random jitter of RJ_UI rms.  The output is the
// sliced (digital) received signal.
`timescale 1ps/1fs
module prbs_channel #(
  parameter int  N_BITS  = 100_000,
  parameter real T_TX_PS = 400.0,
  parameter real T0_PS   = 2000.0,
  parameter real ALPHA   = 0.3,
  parameter real RJ_UI   = 0.01,
  parameter int  HIST    = 24
) (
  output logic data_out
);

  bit hist [HIST+1];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += $itor($urandom_range(0, 1_000_000)) / 1_000_000.0;
    return s - 6.0;
  endfunction

  initial begin
    static logic [22:0] lfsr = 23'h7ACE11;
    real tau, t_edge, s;
    tau = -T_TX_PS / $ln(ALPHA);
    data_out = 1'b0;
    foreach (hist[i]) hist[i] = 1'b0;
    for (int n = 0; n < N_BITS; n++) begin
      bit b;
      b = lfsr[22] ^ lfsr[17];
      lfsr = {lfsr[21:0], b};
      // hist[0] = previous symbol, hist[m-1] = symbol m places back
      if (b != hist[0]) begin
        s = 0.0;
        for (int m = 2; m <= HIST; m++) begin
          bit bm;
          bm = b ? hist[m-1] : !hist[m-1];
          if (bm) s += ALPHA ** (m - 1) - ALPHA ** m;
        end
        t_edge = T0_PS + real'(n) * T_TX_PS + tau * $ln(2.0 - 2.0 * s) - tau * $ln(2.0)
                 + RJ_UI * T_TX_PS * gauss();
        if (t_edge > $realtime) #(t_edge - $realtime);
        data_out = b;
      end
      for (int m = HIST; m > 0; m--) hist[m] = hist[m-1];
      hist[0] = b;
    end
  end

endmodule
