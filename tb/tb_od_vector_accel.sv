// tb_od_vector_accel: end-to-end test of the vector unit at its default size
// (eight 32-bit Mitchell multipliers in two groups).
//
// A stream of vectors is issued, one per cycle with random idle cycles in
// between, in randomly changing accuracy modes. Each result must appear
// exactly one cycle after its vector, and every product, valid bit, swap
// flag and group sum is compared with the reference model. The test counts
// the mechanisms of the design and fails if any of them never happened:
// each of the six mode switches, the comparator choosing y, a power-of-two
// term that is zero in OD-4 (operand with fewer than three set bits), a
// carry from the fraction sum into the exponent, elements ignored because a
// split mode uses fewer slots, back-to-back vectors, idle cycles, and a
// reset in the middle of the stream.
module tb_od_vector_accel;
  import od_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned N      = 32;
  localparam int unsigned LANES  = 8;
  localparam int unsigned GROUPS = LANES / 4;

  logic                      clk = 1'b0;
  logic                      rst_n;
  logic                      in_valid;
  od_mode_t                  in_mode;
  logic [LANES-1:0][N-1:0]   in_x, in_y;
  logic                      out_valid;
  od_mode_t                  out_mode;
  logic [LANES-1:0][2*N-1:0] out_prod;
  logic [LANES-1:0]          out_pvalid, out_swapped;
  logic [GROUPS-1:0][2*N+1:0] out_dot;

  od_vector_accel dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_mode(in_mode),
    .in_x(in_x), .in_y(in_y), .out_valid(out_valid), .out_mode(out_mode),
    .out_prod(out_prod), .out_pvalid(out_pvalid), .out_swapped(out_swapped),
    .out_dot(out_dot)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_switch[3][3];
  int n_swap = 0, n_zero_term = 0, n_carry = 0, n_ignored = 0;
  int n_b2b = 0, n_idle = 0, n_reset = 0, n_vec = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    return $urandom() >> ($urandom() % 32);
  endfunction

  // Expected outputs of the vector issued in the previous cycle.
  logic                       exp_valid;
  od_mode_t                   exp_mode;
  logic [LANES-1:0][2*N-1:0]  exp_prod;
  logic [LANES-1:0]           exp_pvalid, exp_swap;
  logic [GROUPS-1:0][2*N+1:0] exp_dot;

  task automatic model();
    int ways, n, per;
    ways = od_ways(in_mode);
    n    = LANES / ways;
    per  = 4 / ways;
    exp_valid = in_valid;
    exp_mode  = in_mode;
    exp_dot   = '0;
    for (int e = 0; e < LANES; e++) begin
      if (e < n) begin
        exp_prod[e]   = od_ref(in_x[e], in_y[e], ways);
        exp_pvalid[e] = 1'b1;
        exp_swap[e]   = (ways > 1) && (in_y[e] < in_x[e]);
        exp_dot[e / per] += (2*N+2)'(exp_prod[e]);
      end else begin
        exp_prod[e] = '0; exp_pvalid[e] = 1'b0; exp_swap[e] = 1'b0;
      end
    end
  endtask

  // Count which mechanisms this vector exercises.
  task automatic note(od_mode_t prev);
    int ways, n;
    ways = od_ways(in_mode);
    n    = LANES / ways;
    n_switch[int'(prev)][int'(in_mode)]++;
    if (n < LANES) n_ignored++;
    for (int e = 0; e < n; e++) begin
      logic [31:0] d;
      d = (in_y[e] < in_x[e]) ? in_y[e] : in_x[e];
      if (ways > 1 && in_y[e] < in_x[e]) n_swap++;
      if (ways == 4 && d != 0 && $countones(d) < 3) n_zero_term++;
      if (ways == 1 && in_x[e] != 0 && in_y[e] != 0 &&
          ((64'(in_x[e]) << msb_pos(64'(in_y[e]))) + (64'(in_y[e]) << msb_pos(64'(in_x[e])))) >=
          (64'd3 << (msb_pos(64'(in_x[e])) + msb_pos(64'(in_y[e])))))
        n_carry++;
    end
  endtask

  task automatic compare();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++; $display("FAIL cycle %0d: out_valid %b expected %b", cycles, out_valid, exp_valid);
    end
    if (exp_valid && out_valid) begin
      checks++;
      if (out_mode !== exp_mode || out_pvalid !== exp_pvalid || out_swapped !== exp_swap) begin
        failures++; $display("FAIL cycle %0d: mode/valid/swap mismatch", cycles);
      end
      for (int e = 0; e < LANES; e++) begin
        checks++;
        if (out_prod[e] !== exp_prod[e]) begin
          failures++; $display("FAIL cycle %0d elem %0d: %0d expected %0d", cycles, e, out_prod[e], exp_prod[e]);
        end
      end
      for (int g = 0; g < GROUPS; g++) begin
        checks++;
        if (out_dot[g] !== exp_dot[g]) begin
          failures++; $display("FAIL cycle %0d group %0d dot", cycles, g);
        end
      end
    end
  endtask

  initial begin
    od_mode_t prev;
    bit       prev_valid;
    rst_n = 1'b0; in_valid = 1'b0; in_mode = OD1; in_x = '0; in_y = '0;
    exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid set in reset"); end
    @(negedge clk);
    rst_n = 1'b1;
    prev = OD1; prev_valid = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      // drive on the falling edge
      @(negedge clk);
      if (c == 2000) begin
        // reset in the middle of the stream: the pending result is dropped
        rst_n = 1'b0; in_valid = 1'b1;
        exp_valid = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid after reset"); end
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
        prev_valid = 1'b0;
      end
      in_valid = ($urandom() % 5) != 0;
      if (($urandom() % 3) == 0) in_mode = od_mode_t'($urandom() % 3);
      for (int e = 0; e < LANES; e++) begin
        case ($urandom() % 4)
          0: begin in_x[e] = rnd(); in_y[e] = rnd(); end
          1: begin in_x[e] = $urandom(); in_y[e] = $urandom(); end
          2: begin in_x[e] = 32'd1 << ($urandom() % 32) | 32'd1 << ($urandom() % 32); in_y[e] = rnd(); end
          default: begin in_x[e] = $urandom() % 256; in_y[e] = $urandom() % 256; end
        endcase
      end
      if (in_valid) begin
        n_vec++;
        note(prev);
        prev = in_mode;
        if (prev_valid) n_b2b++;
      end else n_idle++;
      prev_valid = in_valid;
      // the DUT captures on the rising edge; the result is checked after it
      @(posedge clk);
      model();
      #1;
      cycles++;
      compare();
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk); #1;
    exp_valid = 1'b0;
    compare();

    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if (a != b) begin
          checks++;
          if (n_switch[a][b] == 0) begin failures++; $display("FAIL no switch %0d -> %0d", a, b); end
        end
    checks++; if (n_swap == 0)      begin failures++; $display("FAIL no operand swap"); end
    checks++; if (n_zero_term == 0) begin failures++; $display("FAIL no zero OD-4 term"); end
    checks++; if (n_carry == 0)     begin failures++; $display("FAIL no fraction carry"); end
    checks++; if (n_ignored == 0)   begin failures++; $display("FAIL no ignored slots"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back vectors"); end
    checks++; if (n_idle == 0)      begin failures++; $display("FAIL no idle cycles"); end
    checks++; if (n_reset == 0)     begin failures++; $display("FAIL no reset"); end
    $display("vectors=%0d swaps=%0d zero_terms=%0d carries=%0d b2b=%0d idle=%0d",
             n_vec, n_swap, n_zero_term, n_carry, n_b2b, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
