// dsm_model: behavioural model (not synthesizable) of the 1 GS/s delta-sigma modulator
// that drives the decimation filter, used only as a stimulus source.
//
// It realises the modulator's noise transfer function
//   NTF(z) = (1 + 1.352z^-1)(1 - 1.998z^-1 + z^-2)(1 - 1.988z^-1 + z^-2)
//            / ((1 - 1.204z^-1 + 0.3771z^-2)(1 - 1.43z^-1 + 0.6585z^-2))
// in error-feedback form: the quantizer input is w = u + ((NTF - 1) applied to e), with
// e = v - w the quantization error, so that V = U + NTF * E. The quantizer has 16 levels
// at the odd integers -15 .. +15; the output is offset to unsigned code (v + 15) / 2.
// A real modulator is a continuous-time loop with the same NTF; this discrete-time model
// only reproduces its noise shaping. u must stay inside roughly +-7 (about -7 dBFS) for the
// loop to stay unsaturated.
//
// Interface: clk (sample clock), rst_n (clears the loop state), u (input, real, in
// quantizer units), code (4-bit unsigned output, changes after each rising clk edge).
module dsm_model (
  input  logic       clk,
  input  logic       rst_n,
  input  real        u,
  output logic [3:0] code
);

  // NTF numerator and denominator, expanded: numerator degree 5, denominator degree 4
  real num [6];
  real den [6];
  real e_hist [6];   // e_hist[k] = e(n-k)
  real s_hist [6];   // s_hist[k] = output of (NTF - 1) at n-k

  function automatic void poly_mul(input real a [6], input real b [6], output real c [6]);
    for (int i = 0; i < 6; i++) c[i] = 0.0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6 - i; j++) c[i+j] += a[i] * b[j];
  endfunction

  initial begin
    real f1 [6], f2 [6], f3 [6], t [6];
    f1 = '{1.0, 1.352, 0.0, 0.0, 0.0, 0.0};
    f2 = '{1.0, -1.998, 1.0, 0.0, 0.0, 0.0};
    f3 = '{1.0, -1.988, 1.0, 0.0, 0.0, 0.0};
    poly_mul(f1, f2, t);
    poly_mul(t, f3, num);
    f1 = '{1.0, -1.204, 0.3771, 0.0, 0.0, 0.0};
    f2 = '{1.0, -1.43, 0.6585, 0.0, 0.0, 0.0};
    poly_mul(f1, f2, den);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      foreach (e_hist[k]) e_hist[k] = 0.0;
      foreach (s_hist[k]) s_hist[k] = 0.0;
      code <= 4'd7;
    end else begin
      real s, w, q;
      // (NTF - 1) = (num - den) / den, strictly causal
      s = 0.0;
      for (int k = 1; k < 6; k++) s += (num[k] - den[k]) * e_hist[k-1] - den[k] * s_hist[k-1];
      w = u + s;
      q = 2.0 * $floor(w / 2.0) + 1.0;
      if (q > 15.0) q = 15.0;
      if (q < -15.0) q = -15.0;
      for (int k = 5; k > 0; k--) begin
        e_hist[k] = e_hist[k-1];
        s_hist[k] = s_hist[k-1];
      end
      e_hist[0] = q - w;
      s_hist[0] = s;
      code <= 4'(int'((q + 15.0) / 2.0));
    end
  end

endmodule
