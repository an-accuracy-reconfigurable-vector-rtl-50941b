// lod: leading-one detector.
//
// Finds the most significant 1 of the W-bit input x. It returns its bit index
// k (the integer part of Mitchell's approximate base-2 logarithm), the same
// bit as a one-hot mask (a power of two, used by the operand decomposer) and
// a flag that x is non-zero. For x == 0, k and the mask are 0.
// Purely combinational. The design only states that the position of the
// leading 1 is found; the priority scan below is the simplest way to do it.
module lod #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         x,
  output logic [$clog2(W)-1:0] k,
  output logic [W-1:0]         onehot,
  output logic                 nz
);

  always_comb begin
    k      = '0;
    onehot = '0;
    nz     = |x;
    for (int unsigned i = 0; i < W; i++) begin
      if (x[i]) begin
        k      = i[$clog2(W)-1:0];
        onehot = '0;
        onehot[i] = 1'b1;
      end
    end
  end

endmodule
