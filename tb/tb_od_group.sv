// tb_od_group: drives one four-multiplier group in OD-1, OD-2 and OD-4 with
// random and corner-case operands and checks every product, the valid mask,
// the comparator's swap flags and the final-adder (dot) output against the
// reference models. It also checks the accuracy ordering the modes exist for:
// on operands with many set bits the OD-4 error is below 1.1 % and the
// OD-2 error below 4.81 %.
module tb_od_group;
  import od_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 32;
  od_mode_t            mode;
  logic [3:0][N-1:0]   x, y;
  logic [3:0][2*N-1:0] prod;
  logic [3:0]          pvalid;
  logic [2*N+1:0]      dot;
  logic [1:0]          swapped;
  int checks = 0, failures = 0;

  od_group #(.N(N)) dut (
    .mode(mode), .x(x), .y(y), .prod(prod), .pvalid(pvalid), .dot(dot), .swapped(swapped)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(od_mode_t m);
    int ways, n;
    logic [2*N+1:0] esum;
    mode = m;
    #1;
    ways = od_ways(m);
    n    = 4 / ways;
    esum = '0;
    for (int e = 0; e < 4; e++) begin
      logic [63:0] ep;
      ep = (e < n) ? od_ref(x[e], y[e], ways) : 64'd0;
      esum += (2*N+2)'(ep);
      checks++;
      if (prod[e] !== ep || pvalid[e] !== (e < n)) begin
        failures++;
        $display("FAIL mode %s slot %0d: %0d*%0d got %0d exp %0d v=%b",
                 m.name(), e, x[e], y[e], prod[e], ep, pvalid[e]);
      end
      if (ways > 1 && e < n && e < 2) begin
        checks++;
        if (swapped[e] !== (y[e] < x[e])) begin
          failures++; $display("FAIL swap flag slot %0d", e);
        end
      end
      if (ways > 1 && e < n) begin
        real err;
        err = rel_err_pct(64'(x[e]) * 64'(y[e]), prod[e]);
        checks++;
        if (err > ((ways == 4) ? 1.1 : 4.81) + 1e-3) begin
          failures++; $display("FAIL %s error %f %% for %0d*%0d", m.name(), err, x[e], y[e]);
        end
      end
    end
    checks++;
    if (dot !== esum) begin
      failures++; $display("FAIL mode %s dot %0d exp %0d", m.name(), dot, esum);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    return $urandom() >> ($urandom() % 32);
  endfunction

  initial begin
    // corner cases
    x = '0; y = '0;
    run(OD1); run(OD2); run(OD4);
    x = {4{32'hFFFF_FFFF}}; y = {4{32'hFFFF_FFFF}};
    run(OD1); run(OD2); run(OD4);
    x = {32'd3, 32'd3, 32'd3, 32'd3}; y = {32'd3, 32'd3, 32'd3, 32'd3};
    run(OD1); run(OD2); run(OD4);
    x = {32'd9, 32'd1, 32'd100, 32'd7}; y = {32'd2, 32'd77, 32'd5, 32'd1000};
    run(OD1); run(OD2); run(OD4);
    for (int i = 0; i < 3000; i++) begin
      for (int e = 0; e < 4; e++) begin x[e] = rnd(); y[e] = rnd(); end
      run(OD1); run(OD2); run(OD4);
      run(od_mode_t'(2'd3));  // undefined code behaves as OD-1
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
