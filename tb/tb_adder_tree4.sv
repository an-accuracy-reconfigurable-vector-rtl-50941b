// tb_adder_tree4: checks the pair sums and the total of the four-input
// adder tree, including full-scale inputs where every carry is needed.
module tb_adder_tree4;
  localparam int unsigned W = 64;
  logic [3:0][W-1:0] p;
  logic [W:0]        s01, s23;
  logic [W+1:0]      total;
  int checks = 0, failures = 0;

  adder_tree4 #(.W(W)) dut (.p(p), .s01(s01), .s23(s23), .total(total));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] c, logic [W-1:0] d);
    logic [W+1:0] ea, eb, ec, ed;
    p = {d, c, b, a};
    #1;
    ea = (W+2)'(a); eb = (W+2)'(b); ec = (W+2)'(c); ed = (W+2)'(d);
    checks++;
    if ((W+2)'(s01) !== ea + eb || (W+2)'(s23) !== ec + ed || total !== ea + eb + ec + ed) begin
      failures++; $display("FAIL %h %h %h %h -> %h %h %h", a, b, c, d, s01, s23, total);
    end
  endtask

  initial begin
    check('0, '0, '0, '0);
    check('1, '1, '1, '1);
    check('1, 1, 0, 0);
    check(0, 0, '1, 1);
    for (int i = 0; i < 2000; i++)
      check({$urandom(), $urandom()}, {$urandom(), $urandom()},
            {$urandom(), $urandom()}, {$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
