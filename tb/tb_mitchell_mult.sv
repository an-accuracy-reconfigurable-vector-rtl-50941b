// tb_mitchell_mult: checks the Mitchell multiplier against the closed-form
// Mitchell product, checks that a power-of-two operand gives the exact
// product, and that the relative error stays below 1/9 (11.11 %), the
// worst case of Mitchell's method, reached when both fractions are 0.5.
module tb_mitchell_mult;
  import tb_ref_pkg::*;
  localparam int unsigned N = 32;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  real worst = 0.0;

  mitchell_mult #(.N(N)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] va, logic [N-1:0] vb);
    logic [63:0] exp_p, exact;
    real e;
    a = va; b = vb;
    #1;
    exp_p = mitchell_ref(va, vb);
    exact = 64'(va) * 64'(vb);
    checks++;
    if (p !== exp_p) begin
      failures++; $display("FAIL %0d*%0d: got %0d exp %0d", va, vb, p, exp_p);
    end
    e = rel_err_pct(exact, p);
    if (e > worst) worst = e;
    if (p > exact || e > 11.1112) begin
      failures++; $display("FAIL error bound %0d*%0d: %0d vs exact %0d", va, vb, p, exact);
    end
  endtask

  initial begin
    // zeros, ones, extremes
    check(0, 0); check(0, 12345); check(777, 0); check(1, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF); check(32'hFFFF_FFFF, 1);
    // worst case: both fractions 0.5 -> 3*3 gives 8
    check(3, 3);
    if (p !== 64'd8) begin failures++; $display("FAIL 3*3 = %0d, expected 8", p); end
    checks++;
    check(32'hC000_0000, 32'hC000_0000);
    // power-of-two operands are exact
    for (int i = 0; i < 300; i++) begin
      logic [31:0] pw, v;
      pw = 32'd1 << ($urandom() % 32);
      v  = $urandom() >> ($urandom() % 32);
      check(pw, v);
      checks++;
      if (p !== 64'(pw) * 64'(v)) begin failures++; $display("FAIL exact %0d*%0d", pw, v); end
    end
    // random operands of random magnitude
    for (int i = 0; i < 20000; i++)
      check($urandom() >> ($urandom() % 32), $urandom() >> ($urandom() % 32));
    // the worst case must actually be approached
    checks++;
    if (worst < 11.0) begin failures++; $display("FAIL worst error only %f %%", worst); end
    $display("worst relative error %f %%", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
