// decim_pkg: constants shared by the two-stage 1 GS/s -> 40 MS/s decimation filter.
//
// The filter takes the 4-bit unsigned output of a 1 GS/s delta-sigma modulator and
// decimates it by 25 in two stages of 5. Stage 1 is the polyphase form of
// H1(z) = (1 + z^-1 + z^-2 + z^-3 + z^-4)^4 (the 10-tap fourth-order sinc with its
// (1 + z^-5)^4 factor moved to stage 2). Stage 2 is the 64-tap FIR Hf(z), a 60th-order
// equiripple low-pass multiplied by (1 + z^-1)^4, with 10-bit integer coefficients.
// The coefficient values are those of the design; the output width of stage 2 is this
// design's choice (full precision, no rounding).
package decim_pkg;

  // decimation factor of each stage
  localparam int unsigned M = 5;
  // modulator sample width (unsigned, 16 levels)
  localparam int unsigned IN_W = 4;
  // stage-1 output width: 15 * 625 = 9375 < 2^14
  localparam int unsigned SINC_W = 14;
  // stage-2 output width (signed): sum|hf| * 9375 = 84,243,750 < 2^27
  localparam int unsigned FIR_W = 28;

  // Polyphase taps of H1(z): E0 = 1 + 52z^-1 + 68z^-2 + 4z^-3 (E1 is its mirror),
  // E2 = 10 + 80z^-1 + 35z^-2 (E4 is its mirror), E3 = 20 + 85z^-1 + 20z^-2.
  localparam int unsigned SINC_TAPS = 17;
  typedef int unsigned sinc_coef_t [SINC_TAPS];
  localparam sinc_coef_t SINC_H = '{1, 4, 10, 20, 35, 52, 68, 80, 85, 80, 68, 52, 35, 20, 10, 4, 1};

  // First half of the symmetric 64-tap stage-2 filter, hf[k] = hf[63-k].
  localparam int unsigned FIR_TAPS = 64;
  localparam int unsigned FIR_HALF = 32;
  typedef int fir_half_t [FIR_HALF];
  localparam fir_half_t FIR_H = '{
       1,    6,   13,   18,   17,    8,   -9,  -31,
     -52,  -64,  -61,  -40,   -7,   28,   51,   52,
      26,  -20,  -69, -100,  -94,  -46,   36,  124,
     180,  168,   64, -132, -392, -666, -894, -1024};

  // full 64-tap coefficient k of Hf(z)
  function automatic int fir_coef(int k);
    return (k < int'(FIR_HALF)) ? FIR_H[k] : FIR_H[FIR_TAPS-1-k];
  endfunction

endpackage
