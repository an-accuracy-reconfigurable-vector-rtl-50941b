// tb_lod: checks the leading-one detector against a top-down bit scan, on
// zero, every single-bit value, all-ones and random values of random width.
module tb_lod;
  localparam int unsigned W = 32;
  logic [W-1:0]         x;
  logic [$clog2(W)-1:0] k;
  logic [W-1:0]         onehot;
  logic                 nz;
  int checks = 0, failures = 0;

  lod #(.W(W)) dut (.x(x), .k(k), .onehot(onehot), .nz(nz));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] v);
    int p;
    x = v;
    #1;
    p = -1;
    for (int i = W - 1; i >= 0; i--) if (v[i]) begin p = i; break; end
    checks++;
    if (p < 0) begin
      if (nz !== 1'b0 || onehot !== '0 || k !== '0) begin
        failures++; $display("FAIL x=0: nz=%b k=%0d oh=%h", nz, k, onehot);
      end
    end else if (nz !== 1'b1 || int'(k) != p || onehot !== (W'(1) << p)) begin
      failures++; $display("FAIL x=%h: k=%0d (exp %0d) oh=%h", v, k, p, onehot);
    end
  endtask

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < W; i++) check(W'(1) << i);
    for (int i = 0; i < 2000; i++) check($urandom() >> ($urandom() % W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
