// sinc_filter: first decimation stage, polyphase fourth-order sinc at 200 MHz.
//
// The 10-tap fourth-order sinc ((1 - z^-10)/(1 - z^-1))^4 is split into
// H1(z) = (1 + z^-1 + z^-2 + z^-3 + z^-4)^4 and (1 + z^-5)^4; the second factor is moved
// past the decimator into the FIR stage. H1 has 17 taps and is decomposed into five
// polyphase sub-filters E0..E4 that run at the decimated rate on one block of five
// consecutive 4-bit samples per 5 ns:
//   E0 = 1 + 52z^-1 + 68z^-2 + 4z^-3   on x(5k+4)     E1 = mirror of E0 on x(5k+3)
//   E2 = 10 + 80z^-1 + 35z^-2          on x(5k+2)     E4 = mirror of E2 on x(5k)
//   E3 = 20 + 85z^-1 + 20z^-2          on x(5k+1)
// so that y(k) = sum_n h1(n) x(5k+4-n). Because E1 and E4 are mirror images of E0 and
// E2, and E3 is itself symmetric, samples that meet the same coefficient are first added
// by eight 4-bit carry look-ahead adders (y0..y7, 5 bits; y8 is a single 4-bit sample).
// The nine products are expanded into 20 shifted partial products (one per '1' in each
// coefficient); six pairs that do not overlap are joined by wiring alone, leaving 14 rows
// for a six-level Wallace tree, whose sum and carry vectors a 14-bit Kogge-Stone adder
// merges. Output: 14 bits unsigned, gain 625 (no division by 10^4 is applied).
//
// Interface: blk[i] = x(5k+i) from the decimator, load = block edge (advance). The
// block-delay registers and the output register y update on load edges.
// Timing: the result for block k is computed combinationally during block k's 5 ns
// period and registered into y on the next load edge (one block period of latency).
// The mapping of polyphase branches to samples and the output register are this design's
// choices; the decomposition, adder pairing, partial products and their wiring follow the
// described circuit.
module sinc_filter
  import decim_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [M-1:0][IN_W-1:0]   blk,
  output logic [SINC_W-1:0]        y
);

  typedef logic [IN_W-1:0] smp_t;

  // branch inputs and their block-delayed copies: uN_d[j] = uN(k - j)
  smp_t u0 [4], u1 [4], u2 [3], u3 [3], u4 [3];

  assign u0[0] = blk[4];
  assign u1[0] = blk[3];
  assign u2[0] = blk[2];
  assign u3[0] = blk[1];
  assign u4[0] = blk[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j < 4; j++) begin
        u0[j] <= '0;
        u1[j] <= '0;
      end
      for (int j = 1; j < 3; j++) begin
        u2[j] <= '0;
        u3[j] <= '0;
        u4[j] <= '0;
      end
    end else if (load) begin
      for (int j = 1; j < 4; j++) begin
        u0[j] <= u0[j-1];
        u1[j] <= u1[j-1];
      end
      for (int j = 1; j < 3; j++) begin
        u2[j] <= u2[j-1];
        u3[j] <= u3[j-1];
        u4[j] <= u4[j-1];
      end
    end
  end

  // eight carry look-ahead pre-adders (CLA1..CLA8)
  logic [4:0] ys [8];     // y0..y7
  smp_t       y8;

  cla4 u_cla1 (.a(u0[3]), .b(u1[0]), .s(ys[0]));   // coefficient 4
  cla4 u_cla2 (.a(u0[1]), .b(u1[2]), .s(ys[1]));   // coefficient 52
  cla4 u_cla3 (.a(u0[2]), .b(u1[1]), .s(ys[2]));   // coefficient 68
  cla4 u_cla4 (.a(u0[0]), .b(u1[3]), .s(ys[3]));   // coefficient 1
  cla4 u_cla5 (.a(u2[2]), .b(u4[0]), .s(ys[4]));   // coefficient 35
  cla4 u_cla6 (.a(u2[1]), .b(u4[1]), .s(ys[5]));   // coefficient 80
  cla4 u_cla7 (.a(u2[0]), .b(u4[2]), .s(ys[6]));   // coefficient 10
  cla4 u_cla8 (.a(u3[0]), .b(u3[2]), .s(ys[7]));   // coefficient 20
  assign y8 = u3[1];                               // coefficient 85

  // Partial products. ppN is the Nth term of the expansion of each coefficient into
  // powers of two; the six merged rows place two non-overlapping terms side by side.
  localparam int unsigned PP = 14;
  logic [SINC_W-1:0] pp [PP];

  always_comb begin
    // rows with two trailing zeros grouped together, then four, then the merged rows
    pp[0]  = SINC_W'({ys[0], 2'b0});                 // pp1  = 4*y0
    pp[1]  = SINC_W'({ys[1], 2'b0});                 // pp4  = 4*y1
    pp[2]  = SINC_W'({ys[2], 2'b0});                 // pp6  = 4*y2
    pp[3]  = SINC_W'({ys[1], 4'b0});                 // pp3  = 16*y1
    pp[4]  = SINC_W'({ys[5], 4'b0});                 // pp12 = 16*y5
    pp[5]  = SINC_W'({ys[7], 4'b0});                 // pp15 = 16*y7
    pp[6]  = SINC_W'({ys[7], 2'b0});                 // pp16 = 4*y7
    pp[7]  = SINC_W'({ys[6], 3'b0});                 // pp13 = 8*y6
    pp[8]  = SINC_W'({ys[1], ys[3]});                // pp2 + pp7  = 32*y1 + y3
    pp[9]  = SINC_W'({ys[2], ys[4], 1'b0});          // pp5 + pp9  = 64*y2 + 2*y4
    pp[10] = SINC_W'({ys[4], ys[4]});                // pp8 + pp10 = 32*y4 + y4
    pp[11] = SINC_W'({ys[5], ys[6], 1'b0});          // pp11 + pp14 = 64*y5 + 2*y6
    pp[12] = SINC_W'({y8, y8, 2'b0});                // pp17 + pp19 = 64*y8 + 4*y8
    pp[13] = SINC_W'({y8, y8});                      // pp18 + pp20 = 16*y8 + y8
  end

  logic [SINC_W-1:0] t_sum, t_carry, result;
  logic              unused_cout;

  wallace_tree #(.N(PP), .W(SINC_W)) u_tree (
    .rows (pp),
    .sum  (t_sum),
    .carry(t_carry)
  );

  // vector merging adder
  kogge_stone_adder #(.W(SINC_W)) u_vma (
    .a   (t_sum),
    .b   (t_carry),
    .cin (1'b0),
    .s   (result),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      y <= '0;
    else if (load)
      y <= result;
  end

endmodule
