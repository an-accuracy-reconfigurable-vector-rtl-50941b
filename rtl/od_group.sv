// od_group: four Mitchell multipliers that can be reconfigured between
// OD-1, OD-2 and OD-4.
//
// OD-1: multiplier i computes x[i]*y[i]; four products per cycle.
// OD-2: for elements e = 0, 1 the smaller of x[e], y[e] is split into its
//   leading power of two and the remainder (X = X11 + X'), and multipliers
//   2e and 2e+1 compute X11*Y and X'*Y; a first-level adder sums them.
//   Two products per cycle.
// OD-4: for element 0 the smaller operand is split into three powers of two
//   and a remainder (X = X11 + X12 + X13 + X''') and the four multipliers
//   compute each term times Y; the whole adder tree sums them. One product
//   per cycle.
// A product by a power of two is exact in Mitchell's method (it is a
// shift), so only the remainder term carries an error, and the remainder is
// smaller the more terms are split off.
//
// Ports: x, y are the operand slots; in OD-2 only slots 0-1 are read, in
// OD-4 only slot 0. prod[e] is product e and pvalid[e] says whether slot e
// holds a product in this mode (unused slots are 0). dot is the output of
// the final adder: the sum of the group's products in every mode. swapped[e]
// says the comparator chose y[e] to be split. The code 2'd3 behaves as OD-1.
//
// The multipliers, the decomposition and the adder tree are those of the
// design. The slot numbering, the pvalid/dot outputs and the sharing of one
// comparator and decomposer per element are this implementation's choices.
// Purely combinational.
module od_group
  import od_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          CMP_EN = 1'b1
) (
  input  od_mode_t            mode,
  input  logic [3:0][N-1:0]   x,
  input  logic [3:0][N-1:0]   y,
  output logic [3:0][2*N-1:0] prod,
  output logic [3:0]          pvalid,
  output logic [2*N+1:0]      dot,
  output logic [1:0]          swapped
);

  // Operand selection and decomposition for the two elements that can be split.
  logic [1:0][N-1:0] dec, keep;
  logic [1:0][N-1:0] t11, t12, t13, t1r, t1rr, t1rrr;

  for (genvar e = 0; e < 2; e++) begin : g_split
    operand_compare #(.N(N), .CMP_EN(CMP_EN)) u_cmp (
      .x(x[e]), .y(y[e]), .dec(dec[e]), .keep(keep[e]), .swapped(swapped[e])
    );
    operand_decomposer #(.N(N)) u_dec (
      .x(dec[e]), .x11(t11[e]), .x12(t12[e]), .x13(t13[e]),
      .x1r(t1r[e]), .x1rr(t1rr[e]), .x1rrr(t1rrr[e])
    );
  end

  // Operand routing into the four multipliers.
  logic [3:0][N-1:0]   ma, mb;
  logic [3:0][2*N-1:0] mp;

  always_comb begin
    case (mode)
      OD2: begin
        ma = {t1r[1], t11[1], t1r[0], t11[0]};
        mb = {keep[1], keep[1], keep[0], keep[0]};
      end
      OD4: begin
        ma = {t1rrr[0], t13[0], t12[0], t11[0]};
        mb = {4{keep[0]}};
      end
      default: begin
        ma = x;
        mb = y;
      end
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_mul
    mitchell_mult #(.N(N)) u_mul (.a(ma[i]), .b(mb[i]), .p(mp[i]));
  end

  logic [2*N:0]   s01, s23;
  logic [2*N+1:0] total;

  adder_tree4 #(.W(2*N)) u_tree (.p(mp), .s01(s01), .s23(s23), .total(total));

  // Result selection. A sum of decomposed terms never exceeds the exact
  // product, so it fits in 2N bits.
  always_comb begin
    dot = total;
    case (mode)
      OD2: begin
        prod   = {{2{(2*N)'(0)}}, s23[2*N-1:0], s01[2*N-1:0]};
        pvalid = 4'b0011;
      end
      OD4: begin
        prod   = {{3{(2*N)'(0)}}, total[2*N-1:0]};
        pvalid = 4'b0001;
      end
      default: begin
        prod   = mp;
        pvalid = 4'b1111;
      end
    endcase
  end

endmodule
