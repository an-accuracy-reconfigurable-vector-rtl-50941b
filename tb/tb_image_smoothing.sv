// tb_image_smoothing: Gaussian image smoothing run on the vector unit in each
// accuracy mode, scored against the same smoothing done with exact products.
//
// A W x H 8-bit grey image is generated (a diagonal gradient with discs of
// different brightness plus uniform noise). The 3x3 Gaussian kernel with
// sigma = 1, H(x,y) = exp(-(x^2+y^2)/2) / (2*pi), is quantised to unsigned
// fixed point with 8 fraction bits, floor(H * 256), giving 40 (centre),
// 24 (edges) and 14 (corners). Every pixel-times-kernel product is computed
// by the unit, as many per cycle as the mode allows (8, 4 or 2); the nine
// products of a pixel are summed and divided by the kernel sum (averaging).
// Border pixels are left out. The result is compared with the exact
// smoothing by PSNR, in dB. The test checks that the results arrive one
// cycle after issue, that no product exceeds the exact one, that OD-2 beats
// OD-1 and OD-4 beats OD-2 in PSNR, and that OD-1 stays above 20 dB.
module tb_image_smoothing;
  import od_pkg::*;

  localparam int unsigned N     = 32;
  localparam int unsigned LANES = 8;
  localparam int          W     = 48;
  localparam int          H     = 48;

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
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned img [H][W];
  int unsigned kern[3][3];
  int unsigned ksum;

  // Flat list of the products needed: pixel value and kernel weight.
  localparam int NPROD = (W - 2) * (H - 2) * 9;
  int unsigned pa [NPROD];
  int unsigned pb [NPROD];
  longint unsigned res [NPROD];

  task automatic build();
    int i;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x + y) * 2 + 20;
        if ((x - 14) * (x - 14) + (y - 16) * (y - 16) < 64) v = 220;
        if ((x - 34) * (x - 34) + (y - 30) * (y - 30) < 81) v = 60;
        v = v + int'($urandom() % 41) - 20;
        img[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        kern[dy + 1][dx + 1] =
          int'($floor($exp(-real'(dx * dx + dy * dy) / 2.0) / (2.0 * 3.14159265358979) * 256.0));
    ksum = 0;
    foreach (kern[a, b]) ksum += kern[a][b];
    i = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            pa[i] = img[y + dy][x + dx];
            pb[i] = kern[dy + 1][dx + 1];
            i++;
          end
  endtask

  // Push all products through the unit in mode m.
  task automatic run(od_mode_t m);
    int n;
    n = LANES / od_ways(m);
    for (int base = 0; base < NPROD; base += n) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mode  = m;
      in_x     = '0;
      in_y     = '0;
      for (int e = 0; e < n; e++)
        if (base + e < NPROD) begin
          in_x[e] = N'(pa[base + e]);
          in_y[e] = N'(pb[base + e]);
        end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== 1'b1 || out_mode !== m) begin
        failures++; $display("FAIL result not valid one cycle after issue");
      end
      for (int e = 0; e < n; e++)
        if (base + e < NPROD) begin
          res[base + e] = out_prod[e];
          if (out_prod[e] > 64'(pa[base + e]) * 64'(pb[base + e])) begin
            failures++; $display("FAIL product above exact");
          end
        end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // PSNR of the smoothing from res[] against exact smoothing.
  function automatic real psnr();
    real mse;
    int  npix;
    mse = 0.0;
    npix = NPROD / 9;
    for (int p = 0; p < npix; p++) begin
      longint unsigned sa, se;
      real d;
      sa = 0; se = 0;
      for (int t = 0; t < 9; t++) begin
        sa += res[p*9 + t];
        se += longint'(pa[p*9 + t]) * longint'(pb[p*9 + t]);
      end
      d = real'(sa / ksum) - real'(se / ksum);
      mse += d * d;
    end
    mse = mse / npix;
    if (mse == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    real p1, p2, p4;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = OD1; in_x = '0; in_y = '0;
    build();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    $display("kernel: corner %0d edge %0d centre %0d, sum %0d", kern[0][0], kern[0][1], kern[1][1], ksum);
    checks++;
    if (kern[1][1] != 40 || kern[0][1] != 24 || kern[0][0] != 14) begin
      failures++; $display("FAIL kernel quantisation");
    end
    run(OD1); p1 = psnr();
    run(OD2); p2 = psnr();
    run(OD4); p4 = psnr();
    $display("PSNR against exact smoothing: OD-1 %0.2f dB, OD-2 %0.2f dB, OD-4 %0.2f dB", p1, p2, p4);
    checks++; if (!(p2 > p1)) begin failures++; $display("FAIL OD-2 not better than OD-1"); end
    checks++; if (!(p4 > p2)) begin failures++; $display("FAIL OD-4 not better than OD-2"); end
    checks++; if (!(p1 > 20.0)) begin failures++; $display("FAIL OD-1 PSNR too low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
