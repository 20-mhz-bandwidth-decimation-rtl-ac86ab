// decimation_filter: two-stage 1 GS/s -> 40 MS/s decimation filter for a delta-sigma ADC.
//
// The 4-bit unsigned output of a 1 GS/s fourth-order delta-sigma modulator (OSR 25,
// 20 MHz signal band) is low-pass filtered and decimated by 25 in two stages of 5:
//
//   din (1 GS/s) -> decimator 1 -> sinc_filter (200 MS/s) -> decimator 2 -> fir_filter
//                   (ring counter 1)                         (ring counter 2)   (40 MS/s)
//
// Stage 1 is a fourth-order 10-tap sinc, built as the polyphase form of
// (1 + z^-1 + .. + z^-4)^4; its (1 + z^-5)^4 factor is folded into stage 2's 64-tap FIR.
// Polyphase decomposition means no arithmetic runs at 1 GHz: only the first ring counter
// and the first decimator's slot registers see every sample. Each stage has a one-hot
// ring-counter clock divider whose reset is released through a reset synchronizer.
//
// Clocking (this design's choice): everything runs on the single master clock clk; the
// 200 MHz and 40 MHz clocks and the phase-shifted decimator clocks are clock enables
// derived from the ring counters (ce5 = first phase of ring counter 1, once every 5 clk;
// ce25 once every 25 clk). In silicon these enables would become gated clocks.
//
// Interface:
//   clk        master clock, one modulator sample per cycle (1 GHz in the target).
//   arst_n     asynchronous active-low reset.
//   din        modulator output, 4-bit unsigned (offset binary, 0..15).
//   sinc_out   stage-1 output (14-bit unsigned, gain 625), sinc_valid high for one clk
//              cycle when it changes (every 5 clk).
//   dout       filter output (28-bit two's complement, full precision, DC gain
//              625 * -5818); dout_valid high for one clk cycle when it changes (every 25).
// Timing: with reset released, sample x(n) on din at edge n, the output whose newest
// input is x(n) appears on dout after edge n + 41. Output n covers
//   dout = sum_m htot(m) x(n-m), htot = h1 (*) hf upsampled by 5 (332 taps).
module decimation_filter
  import decim_pkg::*;
(
  input  logic                    clk,
  input  logic                    arst_n,
  input  logic [IN_W-1:0]         din,
  output logic [SINC_W-1:0]       sinc_out,
  output logic                    sinc_valid,
  output logic signed [FIR_W-1:0] dout,
  output logic                    dout_valid
);

  // ---------------- stage 1: 1 GHz -> 200 MHz ----------------
  logic                        rst1_n;
  logic [M-1:0]                ph1;
  logic [M-1:0][IN_W-1:0]      blk1;
  logic                        ce5;

  reset_sync #(.STAGES(2)) u_rst1 (
    .clk      (clk),
    .arst_n   (arst_n),
    .en       (1'b1),
    .rst_n_out(rst1_n)
  );

  ring_counter #(.N(M)) u_div1 (
    .clk  (clk),
    .rst_n(rst1_n),
    .en   (1'b1),
    .phase(ph1)
  );

  polyphase_decimator #(.W(IN_W), .M(M)) u_dec1 (
    .clk  (clk),
    .rst_n(rst1_n),
    .en   (1'b1),
    .phase(ph1),
    .din  (din),
    .blk  (blk1),
    .load (ce5)
  );

  sinc_filter u_sinc (
    .clk  (clk),
    .rst_n(rst1_n),
    .load (ce5),
    .blk  (blk1),
    .y    (sinc_out)
  );

  // ---------------- stage 2: 200 MHz -> 40 MHz ----------------
  logic                        rst2_n;
  logic [M-1:0]                ph2;
  logic [M-1:0][SINC_W-1:0]    blk2;
  logic                        ce25;

  reset_sync #(.STAGES(2)) u_rst2 (
    .clk      (clk),
    .arst_n   (arst_n),
    .en       (ce5),
    .rst_n_out(rst2_n)
  );

  ring_counter #(.N(M)) u_div2 (
    .clk  (clk),
    .rst_n(rst2_n),
    .en   (ce5),
    .phase(ph2)
  );

  polyphase_decimator #(.W(SINC_W), .M(M)) u_dec2 (
    .clk  (clk),
    .rst_n(rst2_n),
    .en   (ce5),
    .phase(ph2),
    .din  (sinc_out),
    .blk  (blk2),
    .load (ce25)
  );

  fir_filter u_fir (
    .clk  (clk),
    .rst_n(rst2_n),
    .load (ce25),
    .blk  (blk2),
    .dout (dout)
  );

  // output strobes: high in the cycle after the register they flag was written
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      sinc_valid <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      sinc_valid <= ce5 & rst1_n;
      dout_valid <= ce25 & rst2_n;
    end
  end

endmodule
