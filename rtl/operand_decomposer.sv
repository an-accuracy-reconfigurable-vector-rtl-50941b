// operand_decomposer: splits an operand into powers of two and a remainder.
//
// For an operand X it produces
//   x11 = the leading 1 of X as a power of two,  x1r  = X with it cleared (X'),
//   x12 = the leading 1 of X',                   x1rr = X' with it cleared (X''),
//   x13 = the leading 1 of X'',                  x1rrr = X'' with it cleared (X''').
// Each remainder is the previous value ANDed with the inverted power of two,
// so X = x11 + x1r = x11 + x12 + x13 + x1rrr. OD-2 uses (x11, x1r), OD-4
// uses (x11, x12, x13, x1rrr). A power-of-two term is 0 when the operand has
// run out of 1 bits. The split follows the design; building it as three
// chained leading-one detectors is this implementation's choice.
// Combinational.
module operand_decomposer #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] x11,
  output logic [N-1:0] x12,
  output logic [N-1:0] x13,
  output logic [N-1:0] x1r,
  output logic [N-1:0] x1rr,
  output logic [N-1:0] x1rrr
);

  logic [$clog2(N)-1:0] k1, k2, k3;
  logic                 nz1, nz2, nz3;

  lod #(.W(N)) u_lod1 (.x(x),    .k(k1), .onehot(x11), .nz(nz1));
  lod #(.W(N)) u_lod2 (.x(x1r),  .k(k2), .onehot(x12), .nz(nz2));
  lod #(.W(N)) u_lod3 (.x(x1rr), .k(k3), .onehot(x13), .nz(nz3));

  always_comb begin
    x1r   = ~x11 & x;
    x1rr  = ~x12 & x1r;
    x1rrr = ~x13 & x1rr;
  end

endmodule
