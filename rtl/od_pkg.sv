// od_pkg: types shared by the accuracy-reconfigurable Mitchell vector unit.
//
// The unit runs in one of three operand-decomposition (OD) modes. OD-1 gives
// every Mitchell multiplier its own multiplication. OD-2 splits one operand of
// each multiplication into two terms and uses two multipliers per product.
// OD-4 splits it into four terms and uses four multipliers per product.
// The three mode names come from the design; the two-bit encoding is this
// implementation's own choice.
package od_pkg;

  typedef enum logic [1:0] {
    OD1 = 2'd0,  // plain Mitchell, one multiplier per product
    OD2 = 2'd1,  // two multipliers per product
    OD4 = 2'd2   // four multipliers per product
  } od_mode_t;

  // Multipliers used per product in a mode (the encoding 2'd3 acts as OD-1).
  function automatic int unsigned od_ways(od_mode_t m);
    case (m)
      OD2:     return 2;
      OD4:     return 4;
      default: return 1;
    endcase
  endfunction

endpackage
