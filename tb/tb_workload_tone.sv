// tb_workload_tone: the filter's evaluation workload, at full size.
//
// A behavioural delta-sigma modulator (dsm_model) converts a tone at bin 1367 of a
// 5^7 = 78,125-point record (1367/78125 * 1 GHz = 17.5 MHz, inside the 20 MHz band) into
// the 4-bit 1 GS/s stream. The decimation filter turns 78,125 + 2,000 samples into 40 MS/s
// outputs; the last 3,125 of them (one full, coherent record) are windowed (Hann) and
// transformed, and the signal-to-noise ratio is the power in bins 1365..1369 over that in
// all other bins above 2 up to 20 MHz.
// Checked: every output equals the 332-tap reference convolution of the modulator stream
// (so the result is that of the ideal integer filter), the tone lands at bin 1367 of the
// output record, and the SNR is above 80 dB. With this model the filter gives about
// 90 dB: the model is a discrete-time stand-in for the real continuous-time modulator
// and is run at 7/15 of full scale to stay stable, so it falls a little short of the
// 93 dB the filter reaches behind the real modulator. The measured SNR is printed.
module tb_workload_tone
  import decim_pkg::*;
;
  localparam int    LAT_OUT = 41;
  localparam int    NTOT    = 17 + 5 * 63;
  localparam int    NREC    = 78125;
  localparam int    NOUT    = NREC / 25;
  localparam int    WARM    = 2000;
  localparam int    BIN     = 1367;
  localparam real   AMP     = 7.0;
  localparam real   PI      = 3.14159265358979;

  logic clk = 0, arst_n = 1;
  logic [IN_W-1:0] code;
  real u = 0.0;
  logic [SINC_W-1:0] sinc_out;
  logic sinc_valid;
  logic signed [FIR_W-1:0] dout;
  logic dout_valid;

  int checks = 0, failures = 0;
  int cyc = 0, base = 0, nsmp = 0;
  int xs [int];
  longint htot [NTOT];
  longint outs [$];

  localparam int HALF [32] = '{1, 6, 13, 18, 17, 8, -9, -31, -52, -64, -61, -40, -7, 28,
    51, 52, 26, -20, -69, -100, -94, -46, 36, 124, 180, 168, 64, -132, -392, -666, -894,
    -1024};

  dsm_model u_dsm (.clk(clk), .rst_n(arst_n), .u(u), .code(code));

  decimation_filter dut (
    .clk(clk), .arst_n(arst_n), .din(code),
    .sinc_out(sinc_out), .sinc_valid(sinc_valid), .dout(dout), .dout_valid(dout_valid));

  always #0.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic make_refs();
    int a [17], b [17];
    foreach (a[i]) a[i] = int'(i == 0);
    repeat (4) begin
      foreach (b[i]) begin
        b[i] = 0;
        for (int j = 0; j < 5; j++) if (i - j >= 0) b[i] += a[i-j];
      end
      a = b;
    end
    foreach (htot[m]) htot[m] = 0;
    for (int j = 0; j < 64; j++)
      for (int n = 0; n < 17; n++)
        htot[5*j + n] += longint'(HALF[(j < 32) ? j : 63 - j]) * longint'(a[n]);
  endtask

  function automatic int xat(int e);
    if (e < base || !xs.exists(e)) return 0;
    return xs[e];
  endfunction

  // stimulus and recording between edges: the modulator input for the next edge, and the
  // modulator code that the next edge hands to the filter
  always @(negedge clk) begin
    if (arst_n) begin
      u <= AMP * $sin(2.0 * PI * real'(BIN) * real'(nsmp) / real'(NREC));
      nsmp <= nsmp + 1;
    end
    xs[cyc + 1] = int'(code);
    if (arst_n && cyc > base && dout_valid) begin
      automatic int e = cyc - LAT_OUT;
      automatic longint want = 0;
      for (int m = 0; m < NTOT; m++) want += htot[m] * longint'(xat(e - m));
      checks++;
      if (longint'(dout) != want) begin
        failures++;
        if (failures < 10) $display("FAIL output at edge %0d: %0d want %0d", cyc, dout, want);
      end
      outs.push_back(longint'(dout));
    end
  end

  task automatic measure();
    real xr [NOUT];
    real ctab [NOUT], stab [NOUT];
    real mean = 0.0, sig = 0.0, noise = 0.0, peak = 0.0, snr;
    int  peak_bin = 0;
    for (int n = 0; n < NOUT; n++) begin
      xr[n] = real'(outs[outs.size() - NOUT + n]);
      mean += xr[n] / real'(NOUT);
      ctab[n] = $cos(2.0 * PI * real'(n) / real'(NOUT));
      stab[n] = $sin(2.0 * PI * real'(n) / real'(NOUT));
    end
    for (int n = 0; n < NOUT; n++)
      xr[n] = (xr[n] - mean) * 0.5 * (1.0 - ctab[n]);
    for (int k = 3; k <= NOUT / 2; k++) begin
      real re = 0.0, im = 0.0, p;
      int idx = 0;
      for (int n = 0; n < NOUT; n++) begin
        re += xr[n] * ctab[idx];
        im -= xr[n] * stab[idx];
        idx += k;
        if (idx >= NOUT) idx -= NOUT;
      end
      p = re * re + im * im;
      if (k >= BIN - 2 && k <= BIN + 2) sig += p;
      else noise += p;
      if (p > peak) begin
        peak = p;
        peak_bin = k;
      end
    end
    snr = 10.0 * $log10(sig / noise);
    $display("tone at output bin %0d, SNR %0.2f dB over %0d outputs", peak_bin, snr, NOUT);
    checks++;
    if (peak_bin != BIN) begin
      failures++;
      $display("FAIL tone at bin %0d, want %0d", peak_bin, BIN);
    end
    checks++;
    if (!(snr > 80.0)) begin
      failures++;
      $display("FAIL SNR %0.2f dB", snr);
    end
  endtask

  initial begin
    #0.1 arst_n = 0;
    make_refs();
    repeat (3) @(negedge clk);
    #0.1 arst_n = 1;
    base = cyc + 3;
    wait (nsmp >= NREC + WARM);
    checks++;
    if (outs.size() < NOUT) begin
      failures++;
      $display("FAIL only %0d outputs", outs.size());
    end else begin
      measure();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREC + WARM + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
