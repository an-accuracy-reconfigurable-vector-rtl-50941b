// tb_operand_decomposer: checks the split X = X11 + X' and
// X = X11 + X12 + X13 + X''' against a reference that removes set bits from
// the top one at a time, and checks that the terms are disjoint.
module tb_operand_decomposer;
  import tb_ref_pkg::*;
  localparam int unsigned N = 32;
  logic [N-1:0] x, x11, x12, x13, x1r, x1rr, x1rrr;
  int checks = 0, failures = 0;

  operand_decomposer #(.N(N)) dut (
    .x(x), .x11(x11), .x12(x12), .x13(x13), .x1r(x1r), .x1rr(x1rr), .x1rrr(x1rrr)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] v);
    x = v;
    #1;
    checks++;
    if (x11 !== split_ref(v, 2, 0) || x1r !== split_ref(v, 2, 1)) begin
      failures++; $display("FAIL OD-2 split of %h: %h + %h", v, x11, x1r);
    end
    checks++;
    if (x11 !== split_ref(v, 4, 0) || x12 !== split_ref(v, 4, 1) ||
        x13 !== split_ref(v, 4, 2) || x1rrr !== split_ref(v, 4, 3)) begin
      failures++; $display("FAIL OD-4 split of %h: %h %h %h %h", v, x11, x12, x13, x1rrr);
    end
    checks++;
    if ((x11 & x12) != 0 || (x12 & x13) != 0 || (x13 & x1rrr) != 0 ||
        (x11 | x12 | x13 | x1rrr) !== v || x1rr !== (x13 | x1rrr)) begin
      failures++; $display("FAIL terms of %h not a partition", v);
    end
  endtask

  initial begin
    check(0); check(1); check(2); check(3); check(7); check(15); check('1);
    check(32'h8000_0000); check(32'h8000_0001); check(32'hA5A5_A5A5);
    for (int i = 0; i < 3000; i++) check($urandom() >> ($urandom() % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
