// cla4: 4-bit carry look-ahead adder.
//
// Adds two 4-bit unsigned samples into a 5-bit sum. Every carry is formed directly from
// the bit generate (a&b) and propagate (a^b) signals in two levels of logic, so no carry
// ripples from bit to bit. The sinc stage uses eight of these to pre-add pairs of input
// samples that share a coefficient before the partial-product tree.
//
// Interface: a, b (4 bits, unsigned) -> s (5 bits). Purely combinational. Carry-in is 0.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [4:0] s
);

  logic [3:0] g, p;
  logic [3:0] c;   // c[k]: carry out of bit k

  assign g = a & b;
  assign p = a ^ b;

  assign c[0] = g[0];
  assign c[1] = g[1] | (p[1] & g[0]);
  assign c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
  assign c[3] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);

  assign s = {c[3], p[3:1] ^ c[2:0], p[0]};

endmodule
