// adder_tree4: the adder tree below a group of four multipliers.
//
// Two first-level adders sum the multiplier outputs pairwise (p0+p1, p2+p3)
// and a final adder sums the two pair sums. In OD-1 the pair sums and the
// total are partial and full dot products. In OD-2 each pair sum is one
// product and the total is their sum. In OD-4 the total is the single
// product. Widths grow by one bit per level, so nothing overflows. The tree
// shape follows the design; the widths are this implementation's.
// Combinational.
module adder_tree4 #(
  parameter int unsigned W = 64
) (
  input  logic [3:0][W-1:0] p,
  output logic [W:0]        s01,
  output logic [W:0]        s23,
  output logic [W+1:0]      total
);

  always_comb begin
    s01   = (W+1)'(p[0]) + (W+1)'(p[1]);
    s23   = (W+1)'(p[2]) + (W+1)'(p[3]);
    total = (W+2)'(s01) + (W+2)'(s23);
  end

endmodule
