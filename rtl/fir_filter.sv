// fir_filter: second decimation stage, polyphase 64-tap FIR at 40 MHz.
//
// Hf(z) = Hpc(z) * (1 + z^-1)^4 is the 60th-order equiripple low-pass (pass band to
// 18.25 MHz, stop band from 24 MHz at 200 MS/s) times the factor moved out of the sinc
// stage, rounded to integer coefficients with |hf| <= 1024. It is symmetric,
// hf(n) = hf(63-n), and is split into five polyphase sub-filters on one block of five
// consecutive 14-bit sinc outputs per 25 ns:
//   G0(z) = sum_j hf(5j) z^-j     on y(5k+4)      G3 = mirror of G0 on y(5k+1)
//   G1(z) = sum_j hf(5j+1) z^-j   on y(5k+3)      G2 = mirror of G1 on y(5k+2)
//   G4(z) = sum_j hf(5j+4) z^-j   on y(5k)        (12 taps, itself symmetric)
// so that out(k) = sum_n hf(n) y(5k+4-n). Each of the 32 distinct coefficients meets two
// samples, one from each of a mirrored pair of branches (or two taps of G4); these are
// added first by 14-bit ripple carry adders into 15-bit multiplicands (a0..a5, b0..b12,
// c0..c12). Each multiplicand is expanded into one shifted partial product per '1' in
// the magnitude of its coefficient. Partial products of positive coefficients go to one
// Wallace tree and those of negative coefficients to another, both treating all rows as
// unsigned. The difference is formed by adding the positive tree's two vectors to the
// inverted vectors of the negative tree plus 2 (one as the adder's carry-in, one as an
// extra constant row), merged by a Kogge-Stone adder.
//
// Interface: blk[i] = y(5k+i) from the second decimator; load = block edge. The block
// delay line and the registered output dout (FIR_W bits, two's complement, full
// precision, gain sum(hf) = -5818 at DC) update on load edges.
// Timing: the result for block k is computed during its 25 ns period and registered on
// the next load edge (one block period of latency).
// The coefficients, decomposition, pre-additions and positive/negative split follow the
// described circuit; the output width, the output register, the branch-to-sample mapping
// and the tree's row order are this design's choices. The one coefficient of 180 is
// formed as described, with two adders instead of four tree rows:
// 180a = ((4a + a) * 9) * 4, one adder giving 5a and a second giving 45a, which enters the
// positive tree as a single row. Every other coefficient uses one row per '1' bit.
module fir_filter
  import decim_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic [M-1:0][SINC_W-1:0]   blk,
  output logic signed [FIR_W-1:0]    dout
);

  localparam int unsigned DEPTH = FIR_TAPS / M;   // 12 block delays at most
  localparam int unsigned MW    = SINC_W + 1;     // multiplicand width
  localparam int          SHK   = 24;             // index of the shared coefficient 180

  // number of '1' bits in the magnitude of coefficients of one sign
  function automatic int unsigned count_rows(bit negative);
    int unsigned n = 0;
    for (int k = 0; k < int'(FIR_HALF); k++) begin
      int c = FIR_H[k];
      if (k == SHK && c == 180) begin
        if (!negative) n += 1;
      end else if ((c < 0) == negative) begin
        int unsigned mag = (c < 0) ? -c : c;
        n += $countones(mag);
      end
    end
    return n;
  endfunction

  localparam int unsigned NPOS = count_rows(1'b0);
  localparam int unsigned NNEG = count_rows(1'b1);

  // hist[i][d] = branch input i delayed by d blocks; branch i carries y(5k+4-i)
  logic [SINC_W-1:0] hist [M][DEPTH+1];

  for (genvar i = 0; i < M; i++) begin : g_branch
    assign hist[i][0] = blk[M-1-i];
    for (genvar d = 1; d <= DEPTH; d++) begin : g_delay
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          hist[i][d] <= '0;
        else if (load)
          hist[i][d] <= hist[i][d-1];
      end
    end
  end

  // Pre-adders: coefficient k multiplies taps n = k and n = 63-k. Tap n = 5d + i is
  // branch i delayed by d blocks.
  logic [MW-1:0] mult [FIR_HALF];

  for (genvar k = 0; k < FIR_HALF; k++) begin : g_pre
    localparam int unsigned N1 = k;
    localparam int unsigned N2 = FIR_TAPS - 1 - k;
    ripple_carry_adder #(.W(SINC_W)) u_rca (
      .a  (hist[N1 % M][N1 / M]),
      .b  (hist[N2 % M][N2 / M]),
      .cin(1'b0),
      .s  (mult[k])
    );
  end

  // 180a = 4 * (9 * (4a + a)): a 17-bit adder for 5a, a 21-bit adder for 45a
  logic [MW+2:0] m5;
  logic [MW+6:0] m45;

  ripple_carry_adder #(.W(MW + 2)) u_sh5 (
    .a  ({mult[SHK], 2'b00}),
    .b  ((MW + 2)'(mult[SHK])),
    .cin(1'b0),
    .s  (m5)
  );

  ripple_carry_adder #(.W(MW + 6)) u_sh45 (
    .a  ({m5, 3'b000}),
    .b  ((MW + 6)'(m5)),
    .cin(1'b0),
    .s  (m45)
  );

  // partial products, positive and negative coefficients apart
  logic [FIR_W-1:0] pos_pp [NPOS];
  logic [FIR_W-1:0] neg_pp [NNEG];

  always_comb begin
    int unsigned ip, in;
    ip = 0;
    in = 0;
    for (int unsigned i = 0; i < NPOS; i++) pos_pp[i] = '0;
    for (int unsigned i = 0; i < NNEG; i++) neg_pp[i] = '0;
    for (int k = 0; k < int'(FIR_HALF); k++) begin
      int mag;
      mag = (FIR_H[k] < 0) ? -FIR_H[k] : FIR_H[k];
      if (k == SHK && FIR_H[k] == 180) begin
        pos_pp[ip] = FIR_W'(m45) << 2;
        ip++;
        mag = 0;
      end
      for (int b = 0; b < 11; b++) begin
        if (mag[b]) begin
          if (FIR_H[k] > 0) begin
            pos_pp[ip] = FIR_W'(mult[k]) << b;
            ip++;
          end else begin
            neg_pp[in] = FIR_W'(mult[k]) << b;
            in++;
          end
        end
      end
    end
  end

  logic [FIR_W-1:0] pos_s, pos_c, neg_s, neg_c;

  wallace_tree #(.N(NPOS), .W(FIR_W)) u_pos_tree (.rows(pos_pp), .sum(pos_s), .carry(pos_c));
  wallace_tree #(.N(NNEG), .W(FIR_W)) u_neg_tree (.rows(neg_pp), .sum(neg_s), .carry(neg_c));

  // pos - neg = pos_s + pos_c + ~neg_s + ~neg_c + 2
  logic [FIR_W-1:0] fin_rows [5];
  logic [FIR_W-1:0] fin_s, fin_c, diff;
  logic             unused_cout;

  assign fin_rows[0] = pos_s;
  assign fin_rows[1] = pos_c;
  assign fin_rows[2] = ~neg_s;
  assign fin_rows[3] = ~neg_c;
  assign fin_rows[4] = FIR_W'(1);

  wallace_tree #(.N(5), .W(FIR_W)) u_fin_tree (.rows(fin_rows), .sum(fin_s), .carry(fin_c));

  kogge_stone_adder #(.W(FIR_W)) u_sub (
    .a   (fin_s),
    .b   (fin_c),
    .cin (1'b1),
    .s   (diff),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      dout <= '0;
    else if (load)
      dout <= signed'(diff);
  end

endmodule
