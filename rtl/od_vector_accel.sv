// od_vector_accel: accuracy-reconfigurable vector multiplier built from
// LANES Mitchell logarithmic multipliers (default eight, 32-bit unsigned).
//
// The multipliers are arranged in groups of four (od_group). Every input
// vector carries its own accuracy mode:
//   OD-1  LANES products per vector, Mitchell accuracy (error up to 11.1 %);
//   OD-2  LANES/2 products, each split over two multipliers;
//   OD-4  LANES/4 products, each split over four multipliers, close to exact.
// The fewer products per vector, the more accurate each one: accuracy is
// traded for parallelism without any extra multiplier.
//
// Element e of a vector goes to group e / (4/ways), slot e % (4/ways), where
// ways is 1, 2 or 4. Elements at or beyond LANES/ways are ignored and their
// outputs are 0 with out_pvalid low. out_dot[g] is the sum of group g's
// products, the output of its final adder, for multiply-accumulate use.
// out_swapped marks the elements whose y operand was the one split.
//
// Timing: one vector is accepted per cycle when in_valid is high; results
// appear one cycle later with out_valid. The datapath is combinational
// between the input ports and the output register. rst_n is an active-low
// synchronous reset of out_valid and the result registers.
// The grouping by four, the three modes and the eight multipliers follow the
// design. The per-vector mode, the element numbering, the single output
// register stage and the reset are this implementation's choices.
module od_vector_accel
  import od_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned LANES  = 8,
  parameter bit          CMP_EN = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  od_mode_t                  in_mode,
  input  logic [LANES-1:0][N-1:0]   in_x,
  input  logic [LANES-1:0][N-1:0]   in_y,
  output logic                      out_valid,
  output od_mode_t                  out_mode,
  output logic [LANES-1:0][2*N-1:0] out_prod,
  output logic [LANES-1:0]          out_pvalid,
  output logic [LANES-1:0]          out_swapped,
  output logic [LANES/4-1:0][2*N+1:0] out_dot
);

  localparam int unsigned GROUPS = LANES / 4;

  if (LANES % 4 != 0 || LANES == 0) begin : g_bad_lanes
    $error("od_vector_accel: LANES must be a non-zero multiple of 4");
  end

  // Route vector elements into group slots.
  logic [GROUPS-1:0][3:0][N-1:0]   gx, gy;
  logic [GROUPS-1:0][3:0][2*N-1:0] gprod;
  logic [GROUPS-1:0][3:0]          gpvalid;
  logic [GROUPS-1:0][2*N+1:0]      gdot;
  logic [GROUPS-1:0][1:0]          gswap;

  // Slot j of group g holds element g*P + j, with P = 4/ways products per group.
  always_comb begin
    gx = '0;
    gy = '0;
    for (int unsigned g = 0; g < GROUPS; g++) begin
      case (in_mode)
        OD2: for (int unsigned j = 0; j < 2; j++) begin
          gx[g][j] = in_x[g*2 + j];
          gy[g][j] = in_y[g*2 + j];
        end
        OD4: begin
          gx[g][0] = in_x[g];
          gy[g][0] = in_y[g];
        end
        default: for (int unsigned j = 0; j < 4; j++) begin
          gx[g][j] = in_x[g*4 + j];
          gy[g][j] = in_y[g*4 + j];
        end
      endcase
    end
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    od_group #(.N(N), .CMP_EN(CMP_EN)) u_group (
      .mode(in_mode), .x(gx[g]), .y(gy[g]),
      .prod(gprod[g]), .pvalid(gpvalid[g]), .dot(gdot[g]), .swapped(gswap[g])
    );
  end

  // Gather group results back into element order.
  logic [LANES-1:0][2*N-1:0] prod_c;
  logic [LANES-1:0]          pvalid_c, swap_c;

  always_comb begin
    prod_c   = '0;
    pvalid_c = '0;
    swap_c   = '0;
    for (int unsigned g = 0; g < GROUPS; g++) begin
      case (in_mode)
        OD2: for (int unsigned j = 0; j < 2; j++) begin
          prod_c[g*2 + j]   = gprod[g][j];
          pvalid_c[g*2 + j] = gpvalid[g][j];
          swap_c[g*2 + j]   = gswap[g][j];
        end
        OD4: begin
          prod_c[g]   = gprod[g][0];
          pvalid_c[g] = gpvalid[g][0];
          swap_c[g]   = gswap[g][0];
        end
        default: for (int unsigned j = 0; j < 4; j++) begin
          prod_c[g*4 + j]   = gprod[g][j];
          pvalid_c[g*4 + j] = gpvalid[g][j];
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_mode    <= OD1;
      out_prod    <= '0;
      out_pvalid  <= '0;
      out_swapped <= '0;
      out_dot     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mode    <= in_mode;
        out_prod    <= prod_c;
        out_pvalid  <= pvalid_c;
        out_swapped <= swap_c;
        out_dot     <= gdot;
      end
    end
  end

  // Only the three defined modes may be issued.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> in_mode inside {OD1, OD2, OD4})
    else $error("od_vector_accel: undefined accuracy mode");

endmodule
