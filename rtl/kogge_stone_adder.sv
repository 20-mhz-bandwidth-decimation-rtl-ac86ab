// kogge_stone_adder: W-bit Kogge-Stone parallel-prefix adder (vector merging adder).
//
// Each bit first forms generate G = a&b and propagate P = a^b. log2(W) levels of "dot"
// operators, (G,P).(G',P') = (G | P&G', P&P'), then combine every bit with the bit 2^l
// places below it, so after the last level bit k holds the group (G,P) of bits k..0.
// The carry out of bit k is C_k = G_k:0 | P_k:0 & cin and the sum is S_k = P_k ^ C_k-1
// (S_0 = P_0 ^ cin). The carry of the top bit is found in O(log W) gate delays.
// The sinc stage uses it at W = 14 to merge the Wallace tree's sum and carry vectors; the
// FIR stage uses it for its final subtraction.
//
// Interface: a, b (W bits), cin -> s (W bits), cout. Purely combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W-1:0] c;

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar k = 0; k < W; k++) begin : g_bit
      if (k >= D) begin : g_dot
        assign g[l+1][k] = g[l][k] | (p[l][k] & g[l][k-D]);
        assign p[l+1][k] = p[l][k] & p[l][k-D];
      end else begin : g_pass
        assign g[l+1][k] = g[l][k];
        assign p[l+1][k] = p[l][k];
      end
    end
  end

  assign c = g[LEVELS] | (p[LEVELS] & {W{cin}});

  if (W > 1) begin : g_sum
    assign s = p[0] ^ {c[W-2:0], cin};
  end else begin : g_sum1
    assign s = p[0] ^ cin;
  end
  assign cout = c[W-1];

endmodule
