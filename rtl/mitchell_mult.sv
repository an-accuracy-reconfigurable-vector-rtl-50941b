// mitchell_mult: Mitchell logarithmic approximate multiplier, unsigned N x N -> 2N.
//
// Each operand A is written as 2^k * (1 + m): k is the position of its leading
// 1, found by a leading-one detector, and the fraction m is the bits below it,
// shifted up to an (N-1)-bit binary fraction. The two fixed-point numbers
// k.m are added; a carry out of the fraction goes into the integer part. The
// sum k_ab.m_ab is decoded by putting the implicit 1 back in front of m_ab and
// shifting the result so that this 1 lands at bit position k_ab.
//
// The fraction keeps all N-1 bits and the decoder all 2N bits, so nothing is
// truncated. The result is the exact Mitchell value
//   A*2^kB + B*2^kA - 2^(kA+kB)           if mA + mB < 1
//   2*(A*2^kB + B*2^kA) - 2^(kA+kB+2)     otherwise,
// which never exceeds A*B. It is exact when one operand is a power of two,
// which the operand decomposition relies on. If either operand is 0 the
// product is forced to 0, because 0 has no logarithm.
// Encode, add and decode follow the design's description. The zero handling
// and the untruncated fraction width are this implementation's choices.
// Purely combinational.
module mitchell_mult #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned KW = $clog2(N);  // width of a leading-one position
  localparam int unsigned FW = N - 1;      // fraction bits
  localparam int unsigned SW = KW + 1 + FW; // log-sum width: integer part may carry

  logic [KW-1:0] ka, kb;
  logic          nza, nzb;
  logic [N-1:0]  oha, ohb;

  lod #(.W(N)) u_lod_a (.x(a), .k(ka), .onehot(oha), .nz(nza));
  lod #(.W(N)) u_lod_b (.x(b), .k(kb), .onehot(ohb), .nz(nzb));

  logic [N-1:0]  a_norm, b_norm;  // leading 1 moved to bit N-1
  logic [FW-1:0] ma, mb;          // fractions
  logic [SW-1:0] sum;             // k_ab.m_ab
  logic [KW:0]   kab;
  logic [FW-1:0] mab;
  logic [2*N-1:0] mant;           // 1.m_ab with the binary point after bit FW

  always_comb begin
    a_norm = a << (KW'(FW) - ka);
    b_norm = b << (KW'(FW) - kb);
    ma     = a_norm[FW-1:0];
    mb     = b_norm[FW-1:0];
    sum    = {1'b0, ka, ma} + {1'b0, kb, mb};
    kab    = sum[SW-1:FW];
    mab    = sum[FW-1:0];
    mant   = {{N{1'b0}}, 1'b1, mab};
    if (!(nza && nzb))
      p = '0;
    else if (kab >= (KW+1)'(FW))
      p = mant << (kab - (KW+1)'(FW));
    else
      p = mant >> ((KW+1)'(FW) - kab);
  end

endmodule
