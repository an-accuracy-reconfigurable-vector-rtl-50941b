// operand_compare: picks the operand that the decomposer will split.
//
// Splitting the smaller of the two operands gives a smaller Mitchell error,
// so this block compares x and y and returns the smaller as `dec` (to be
// decomposed) and the other as `keep`. `swapped` is 1 when y was the smaller
// one. With CMP_EN = 0 the comparator is left out and x is always
// decomposed; the design reports that cheaper variant as an alternative, and
// the default keeps the comparison. Ties keep the order. Combinational.
module operand_compare #(
  parameter int unsigned N      = 32,
  parameter bit          CMP_EN = 1'b1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] dec,
  output logic [N-1:0] keep,
  output logic         swapped
);

  always_comb begin
    swapped = CMP_EN && (y < x);
    dec     = swapped ? y : x;
    keep    = swapped ? x : y;
  end

endmodule
