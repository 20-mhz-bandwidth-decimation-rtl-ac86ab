// ripple_carry_adder: W-bit ripple carry adder.
//
// A chain of W full adders, each passing its carry to the next bit. It is slow (delay
// grows with W) but small, which suits the 40 MHz FIR stage where the 14-bit pre-additions
// of mirrored samples have a 25 ns budget.
//
// Interface: a, b (W bits, unsigned), cin -> s (W+1 bits, carry-out on top).
// Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   s
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end
  assign s[W] = c[W];

endmodule
