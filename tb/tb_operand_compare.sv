// tb_operand_compare: checks that the smaller operand is routed to `dec`,
// with ties keeping the order, for the default comparator and for the
// variant without comparison (CMP_EN = 0).
module tb_operand_compare;
  localparam int unsigned N = 32;
  logic [N-1:0] x, y, dec, keep, dec0, keep0;
  logic         sw, sw0;
  int checks = 0, failures = 0;

  operand_compare #(.N(N))                dut  (.x(x), .y(y), .dec(dec),  .keep(keep),  .swapped(sw));
  operand_compare #(.N(N), .CMP_EN(1'b0)) dut0 (.x(x), .y(y), .dec(dec0), .keep(keep0), .swapped(sw0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] vx, logic [N-1:0] vy);
    logic [N-1:0] lo, hi;
    x = vx; y = vy;
    #1;
    lo = (vx <= vy) ? vx : vy;
    hi = (vx <= vy) ? vy : vx;
    checks++;
    if (dec !== lo || keep !== hi || sw !== (vy < vx)) begin
      failures++; $display("FAIL x=%0d y=%0d: dec=%0d keep=%0d sw=%b", vx, vy, dec, keep, sw);
    end
    checks++;
    if (dec0 !== vx || keep0 !== vy || sw0 !== 1'b0) begin
      failures++; $display("FAIL no-compare x=%0d y=%0d", vx, vy);
    end
  endtask

  initial begin
    check(0, 0); check(5, 5); check(1, 2); check(2, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFE); check(32'h8000_0000, 32'h7FFF_FFFF);
    for (int i = 0; i < 2000; i++)
      check($urandom() >> ($urandom() % 32), $urandom() >> ($urandom() % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
