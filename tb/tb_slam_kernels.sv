// tb_slam_kernels: the two multiplication kernels of laser-scan SLAM run on
// the vector unit in each accuracy mode.
//
// 1. Scan-matching cost G = sum_i (xc_i - xr_i)^2 + (yc_i - yr_i)^2 over
//    point pairs. The unit is unsigned, so the testbench feeds |difference|
//    as both operands and lets each group's final adder (out_dot) sum the
//    squares, four per group in OD-1, two in OD-2, one in OD-4. The total
//    relative error of G must stay inside the mode's per-product bound
//    (11.12 %, 4.81 %, 1.10 %), which checks the multiply-accumulate path.
// 2. Map-point transform x = cos*xl - sin*yl + tx, y = sin*xl + cos*yl + ty,
//    with coordinates in millimetres (up to 20 m) and cos/sin in Q1.15. The
//    signs are handled outside the unit (sign and magnitude), the unit forms
//    the four magnitude products. The mean and largest map-point error, in
//    mm, are reported; the mean must fall from OD-1 to OD-2 to OD-4.
// The point sets and poses are pseudo-random; they stand in for recorded
// scans, which are not part of this test.
module tb_slam_kernels;
  import od_pkg::*;

  localparam int unsigned N      = 32;
  localparam int unsigned LANES  = 8;
  localparam int          NPAIRS = 1024;  // point pairs for the cost
  localparam int          NPTS   = 1024;  // scan points to transform

  logic                      clk = 1'b0;
  logic                      rst_n;
  logic                      in_valid;
  od_mode_t                  in_mode;
  logic [LANES-1:0][N-1:0]   in_x, in_y;
  logic                      out_valid;
  od_mode_t                  out_mode;
  logic [LANES-1:0][2*N-1:0] out_prod;
  logic [LANES-1:0]          out_pvalid, out_swapped;
  logic [LANES/4-1:0][2*N+1:0] out_dot;

  od_vector_accel dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_mode(in_mode),
    .in_x(in_x), .in_y(in_y), .out_valid(out_valid), .out_mode(out_mode),
    .out_prod(out_prod), .out_pvalid(out_pvalid), .out_swapped(out_swapped),
    .out_dot(out_dot)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // |difference| values of the cost function: dx and dy of each pair.
  int unsigned d[2*NPAIRS];
  // Scan points (signed mm) and pose.
  int          xl[NPTS], yl[NPTS];
  int          cs, sn;  // Q1.15
  int          tx, ty;

  task automatic build();
    real th;
    for (int i = 0; i < 2*NPAIRS; i++) d[i] = $urandom() % 1500;  // up to 1.5 m apart
    for (int i = 0; i < NPTS; i++) begin
      xl[i] = int'($urandom() % 40001) - 20000;
      yl[i] = int'($urandom() % 40001) - 20000;
    end
    th = 0.7;
    cs = int'($floor($cos(th) * 32768.0));
    sn = int'($floor($sin(th) * 32768.0));
    tx = 1234; ty = -567;
  endtask

  // Issue one vector and return after its results are visible.
  task automatic issue(od_mode_t m);
    @(negedge clk);
    in_valid = 1'b1;
    in_mode  = m;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b1 || out_mode !== m) begin
      failures++; $display("FAIL result not valid one cycle after issue");
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic cost(od_mode_t m, real bound);
    int  n;
    longint unsigned g_exact, g_unit;
    real rel;
    n = LANES / od_ways(m);
    g_exact = 0; g_unit = 0;
    for (int base = 0; base < 2*NPAIRS; base += n) begin
      in_x = '0; in_y = '0;
      for (int e = 0; e < n; e++) begin
        in_x[e] = N'(d[base + e]);
        in_y[e] = N'(d[base + e]);
        g_exact += longint'(d[base + e]) * longint'(d[base + e]);
      end
      issue(m);
      for (int g = 0; g < int'(LANES / 4); g++) g_unit += longint'(out_dot[g]);
    end
    rel = 100.0 * (real'(g_exact) - real'(g_unit)) / real'(g_exact);
    $display("cost G in %s: exact %0d, unit %0d, error %0.3f %%", m.name(), g_exact, g_unit, rel);
    checks++;
    if (rel < 0.0 || rel > bound) begin
      failures++; $display("FAIL cost error outside [0, %0.2f] %%", bound);
    end
  endtask

  function automatic int unsigned mag(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Returns the mean map-point error in mm.
  task automatic transform(od_mode_t m, output real mean_err);
    int n;
    real sum_err, max_err;
    n   = LANES / od_ways(m);
    sum_err = 0.0; max_err = 0.0;
    for (int i = 0; i < NPTS; i++) begin
      // the four products of point i: cos*xl, sin*yl, sin*xl, cos*yl
      int unsigned pa[4], pb[4];
      longint unsigned r[4];
      longint sx, sy, ex, ey;
      real err;
      pa = '{mag(cs), mag(sn), mag(sn), mag(cs)};
      pb = '{mag(xl[i]), mag(yl[i]), mag(xl[i]), mag(yl[i])};
      for (int base = 0; base < 4; base += n) begin
        in_x = '0; in_y = '0;
        for (int e = 0; e < n && base + e < 4; e++) begin
          in_x[e] = N'(pa[base + e]);
          in_y[e] = N'(pb[base + e]);
        end
        issue(m);
        for (int e = 0; e < n && base + e < 4; e++) r[base + e] = out_prod[e];
      end
      // apply the signs: x = c*xl - s*yl, y = s*xl + c*yl (Q1.15 -> mm)
      sx = ((cs < 0) != (xl[i] < 0) ? -longint'(r[0]) : longint'(r[0]))
         - ((sn < 0) != (yl[i] < 0) ? -longint'(r[1]) : longint'(r[1]));
      sy = ((sn < 0) != (xl[i] < 0) ? -longint'(r[2]) : longint'(r[2]))
         + ((cs < 0) != (yl[i] < 0) ? -longint'(r[3]) : longint'(r[3]));
      ex = longint'(cs) * xl[i] - longint'(sn) * yl[i];
      ey = longint'(sn) * xl[i] + longint'(cs) * yl[i];
      err = $sqrt((real'(sx - ex) / 32768.0) ** 2 + (real'(sy - ey) / 32768.0) ** 2);
      sum_err += err;
      if (err > max_err) max_err = err;
    end
    mean_err = sum_err / NPTS;
    $display("map transform in %s: mean error %0.2f mm, max %0.2f mm", m.name(), mean_err, max_err);
  endtask

  initial begin
    real e1, e2, e4;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = OD1; in_x = '0; in_y = '0;
    build();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    cost(OD1, 11.12);
    cost(OD2, 4.81);
    cost(OD4, 1.10);
    transform(OD1, e1);
    transform(OD2, e2);
    transform(OD4, e4);
    checks++; if (!(e2 < e1)) begin failures++; $display("FAIL OD-2 map error not below OD-1"); end
    checks++; if (!(e4 < e2)) begin failures++; $display("FAIL OD-4 map error not below OD-2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
