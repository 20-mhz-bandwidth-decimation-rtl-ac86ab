// tb_decimation_filter: end-to-end test of the whole two-stage decimation filter at its
// real sizes, one modulator sample per clock.
//
// Every filter output is compared with a direct convolution of the input stream with
// the overall 332-tap response htot = h1 (*) (hf upsampled by 5), built here from the
// definitions: h1 = fourfold 5-tap box, hf = the 64 integer FIR taps. The stream holds
// random samples, a slow 16-level sine, a full-scale run (output 625 * 9375 ... DC
// -54,543,750) and a zero run. Checked too:
//   - the sinc output against the 17-tap convolution, with a latency of 6 clocks;
//   - the filter output latency: the output whose newest input arrived at edge n is
//     presented after edge n + 41, and outputs come every 25 clocks (40 MS/s at 1 GS/s),
//     stage-1 outputs every 5 clocks (200 MS/s);
//   - an asynchronous reset in mid-stream: both reset synchronizers release, the ring
//     counters restart and the filter output restarts from an empty history.
// Mechanisms counted (each must occur): stage-1 block hand-overs, stage-2 block
// hand-overs, reset re-synchronizations, full-scale input, negative and positive outputs.
module tb_decimation_filter
  import decim_pkg::*;
;
  localparam int LAT_OUT  = 41;
  localparam int LAT_SINC = 6;
  localparam int NTOT     = 17 + 5 * 63;

  logic clk = 0, arst_n = 1;
  logic [IN_W-1:0] din = '0;
  logic [SINC_W-1:0] sinc_out;
  logic sinc_valid;
  logic signed [FIR_W-1:0] dout;
  logic dout_valid;

  int checks = 0, failures = 0;
  int cyc = 0;               // rising edges so far
  int base = 0;              // edge of the first sample after the latest reset release
  int xs [int];              // sample on din at each edge
  int h1 [17];
  longint htot [NTOT];
  int last_dv = -1, last_sv = -1;
  int n_blk1 = 0, n_blk2 = 0, n_resync = 0, n_full = 0, n_neg = 0, n_pos = 0;

  localparam int HALF [32] = '{1, 6, 13, 18, 17, 8, -9, -31, -52, -64, -61, -40, -7, 28,
    51, 52, 26, -20, -69, -100, -94, -46, 36, 124, 180, 168, 64, -132, -392, -666, -894,
    -1024};

  decimation_filter dut (
    .clk(clk), .arst_n(arst_n), .din(din),
    .sinc_out(sinc_out), .sinc_valid(sinc_valid), .dout(dout), .dout_valid(dout_valid));

  always #0.5 clk = ~clk;     // 1 GHz
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
    h1 = a;
    foreach (htot[m]) htot[m] = 0;
    for (int j = 0; j < 64; j++)
      for (int n = 0; n < 17; n++)
        htot[5*j + n] += longint'(HALF[(j < 32) ? j : 63 - j]) * longint'(h1[n]);
  endtask

  // sample that entered the filter at edge e (zero before the latest reset release)
  function automatic int xat(int e);
    if (e < base || !xs.exists(e)) return 0;
    return xs[e];
  endfunction

  // output checks, made between edges
  always @(negedge clk) begin
    if (arst_n && cyc > base) begin
      if (sinc_valid) begin
        automatic int e = cyc - LAT_SINC;
        automatic int want = 0;
        for (int n = 0; n < 17; n++) want += h1[n] * xat(e - n);
        n_blk1++;
        checks++;
        if (int'(sinc_out) != want) begin
          failures++;
          $display("FAIL sinc at edge %0d: %0d want %0d", cyc, sinc_out, want);
        end
        if (last_sv >= 0) begin
          checks++;
          if (cyc - last_sv != 5) begin
            failures++;
            $display("FAIL sinc output spacing %0d", cyc - last_sv);
          end
        end
        last_sv = cyc;
      end
      if (dout_valid) begin
        automatic int e = cyc - LAT_OUT;
        automatic longint want = 0;
        for (int m = 0; m < NTOT; m++) want += htot[m] * longint'(xat(e - m));
        n_blk2++;
        checks++;
        if (longint'(dout) != want) begin
          failures++;
          $display("FAIL output at edge %0d: %0d want %0d", cyc, dout, want);
        end
        if (dout < 0) n_neg++;
        if (dout > 0) n_pos++;
        if (dout == -28'sd54543750) n_full++;
        if (last_dv >= 0) begin
          checks++;
          if (cyc - last_dv != 25) begin
            failures++;
            $display("FAIL output spacing %0d", cyc - last_dv);
          end
        end
        last_dv = cyc;
      end
    end
  end

  // Drive one sample per clock between edges; it is recorded against the edge that takes it.
  task automatic drive(int v);
    @(negedge clk);
    din = IN_W'(v);
    xs[cyc + 1] = v;
  endtask

  // Assert reset between edges, release it, and find the first edge the filter uses.
  task automatic do_reset(int hold);
    @(negedge clk);
    #0.2 arst_n = 0;
    last_dv = -1;
    last_sv = -1;
    repeat (hold) drive($urandom % 16);
    @(negedge clk);
    arst_n = 1;
    // two synchronizer edges drop their samples; the third edge takes x(0)
    base = cyc + 3;
    n_resync++;
  endtask

  initial begin
    // power-on reset: a falling edge before the first clock edge clears everything
    #0.1 arst_n = 0;
    make_refs();
    checks++;
    if (htot[0] != 1 || htot[NTOT-1] != 1 || htot[8] != 205) begin
      failures++;
      $display("FAIL reference response %0d %0d %0d", htot[0], htot[NTOT-1], htot[8]);
    end
    do_reset(3);
    for (int i = 0; i < 3000; i++) drive($urandom % 16);
    // slow sine, 16 levels
    for (int i = 0; i < 3000; i++) drive(int'(7.5 + 7.49 * $sin(2.0 * 3.14159265 * i / 57.1)));
    for (int i = 0; i < 1500; i++) drive(15);
    for (int i = 0; i < 1000; i++) drive(0);
    do_reset(7);
    for (int i = 0; i < 2000; i++) drive($urandom % 16);
    repeat (60) drive(0);

    checks++;
    if (n_blk1 == 0 || n_blk2 == 0 || n_resync < 2 || n_full == 0 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("stage-1 blocks %0d, stage-2 blocks %0d, resets %0d, full-scale outputs %0d, negative %0d, positive %0d",
             n_blk1, n_blk2, n_resync, n_full, n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
