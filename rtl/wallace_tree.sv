// wallace_tree: carry-save reduction of N partial products to two vectors.
//
// Each level splits the rows it receives into groups of three and feeds every group to a
// row of full adders (a 3:2 compressor): a + b + c = sum + 2*carry, where the carry vector
// is shifted left one place. Rows left over (one or two) pass to the next level unchanged.
// A level takes one full-adder delay whatever the width, and rows go from r to
// 2*floor(r/3) + r mod 3, so 14 rows need 6 levels and 50 rows need 9. The two rows that
// remain are merged by a fast carry-propagate adder outside this block.
// Rows are grouped in the order given, so a caller that lists rows with the same
// trailing zeros next to each other gets full adders whose low bits see only constant
// zeros, and synthesis removes them.
// All arithmetic is modulo 2^W; W must hold the full sum.
//
// Interface: rows[N] (W bits each) -> sum, carry (W bits each), sum + carry = sum(rows)
// mod 2^W. Purely combinational.
module wallace_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] rows  [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // rows left after one level of 3:2 compressors
  function automatic int unsigned rows_after(int unsigned r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // rows entering level s
  function automatic int unsigned rows_at(int unsigned s);
    int unsigned r = N;
    for (int unsigned i = 0; i < s; i++) r = rows_after(r);
    return r;
  endfunction

  function automatic int unsigned num_levels(int unsigned n);
    int unsigned r = n;
    int unsigned l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(N);

  // Each level's rows live in that level's own generate scope, so no single array spans
  // the whole tree.
  for (genvar s = 0; s <= LEVELS; s++) begin : g_level
    logic [W-1:0] row [N];
    if (s == 0) begin : g_in
      for (genvar r = 0; r < N; r++) begin : g_row
        assign row[r] = rows[r];
      end
    end else begin : g_csa_level
      localparam int unsigned R  = rows_at(s - 1);
      localparam int unsigned G  = R / 3;
      localparam int unsigned RO = rows_after(R);
      for (genvar k = 0; k < G; k++) begin : g_csa
        logic [W-1:0] a, b, c;
        assign a = g_level[s-1].row[3*k];
        assign b = g_level[s-1].row[3*k+1];
        assign c = g_level[s-1].row[3*k+2];
        assign row[2*k]   = a ^ b ^ c;
        assign row[2*k+1] = {((a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) |
                              (b[W-2:0] & c[W-2:0])), 1'b0};
      end
      for (genvar k = 0; k < R % 3; k++) begin : g_pass
        assign row[2*G+k] = g_level[s-1].row[3*G+k];
      end
      for (genvar k = RO; k < N; k++) begin : g_unused
        assign row[k] = '0;
      end
    end
  end

  assign sum = g_level[LEVELS].row[0];
  if (N > 1) begin : g_two
    assign carry = g_level[LEVELS].row[1];
  end else begin : g_one
    assign carry = '0;
  end

endmodule
