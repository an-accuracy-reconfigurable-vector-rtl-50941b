// tb_ref_pkg: reference models used by the testbenches.
//
// They are written from the arithmetic, not from the RTL structure:
//  * mitchell_ref uses the closed form of Mitchell's product,
//      A*2^kB + B*2^kA - 2^(kA+kB)            when mA + mB < 1,
//      2*(A*2^kB + B*2^kA) - 2^(kA+kB+2)      otherwise,
//    with the fraction test done as A*2^kB + B*2^kA >= 3*2^(kA+kB);
//  * split_ref peels set bits off an operand from the top, one at a time;
//  * od_ref picks the smaller operand and sums Mitchell products of its terms.
package tb_ref_pkg;

  typedef logic [65:0] wide_t;

  function automatic int msb_pos(logic [63:0] v);
    for (int i = 63; i >= 0; i--)
      if (v[i]) return i;
    return -1;
  endfunction

  function automatic logic [63:0] mitchell_ref(logic [31:0] a, logic [31:0] b);
    int ka, kb;
    wide_t s, lim;
    if (a == 0 || b == 0) return 64'd0;
    ka  = msb_pos(64'(a));
    kb  = msb_pos(64'(b));
    s   = (wide_t'(a) << kb) + (wide_t'(b) << ka);
    lim = wide_t'(3) << (ka + kb);
    if (s < lim) return 64'(s - (wide_t'(1) << (ka + kb)));
    else         return 64'((s << 1) - (wide_t'(1) << (ka + kb + 2)));
  endfunction

  // Term t (0-based) of splitting v into `ways` parts: the first ways-1
  // terms are the highest set bits of v, the last term is what remains.
  function automatic logic [31:0] split_ref(logic [31:0] v, int ways, int t);
    logic [31:0] rest;
    logic [31:0] term;
    rest = v;
    term = '0;
    for (int i = 0; i < ways; i++) begin
      if (i == ways - 1) begin
        term = rest;
      end else begin
        int p;
        p = msb_pos(64'(rest));
        term = (p < 0) ? 32'd0 : (32'd1 << p);
        rest = rest - term;
      end
      if (i == t) return term;
    end
    return '0;
  endfunction

  // Product of x and y as the reconfigurable unit computes it with `ways`
  // multipliers (1, 2 or 4). With cmp set the smaller operand is split.
  function automatic logic [63:0] od_ref(logic [31:0] x, logic [31:0] y, int ways, bit cmp = 1'b1);
    logic [31:0] d, k;
    logic [63:0] acc;
    if (ways == 1) return mitchell_ref(x, y);
    if (cmp && y < x) begin d = y; k = x; end
    else              begin d = x; k = y; end
    acc = '0;
    for (int t = 0; t < ways; t++)
      acc += mitchell_ref(split_ref(d, ways, t), k);
    return acc;
  endfunction

  // Relative error of an approximation, in percent.
  function automatic real rel_err_pct(logic [63:0] exact, logic [63:0] approx);
    if (exact == 0) return 0.0;
    return 100.0 * (real'(exact) - real'(approx)) / real'(exact);
  endfunction

endpackage
