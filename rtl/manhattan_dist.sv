// manhattan_dist: Manhattan distance between a neuron and an input vector.
//
// d = sum over the DIM lanes of |w[i] - x[i]|, in binary32. The SOMComp
// kernel uses this distance instead of the Euclidean one because it needs
// no square or square root. All DIM lanes work in parallel (the kernel's
// per-dimension loop is fully unrolled) and the lane results are summed by
// a balanced tree of adders, as the balanced-tree floating-point option of
// the accelerator does: level by level, neighbours (2k, 2k+1) are added and
// an odd last term passes to the next level unchanged. Combinational; the
// kernel registers the result. The adder itself is fp_add.
module manhattan_dist
  import som_pkg::*;
#(
  parameter int unsigned DIM = 3
) (
  input  f32_t [DIM-1:0] w,
  input  f32_t [DIM-1:0] x,
  output f32_t           dist_out
);

  localparam int unsigned LEVELS = (DIM > 1) ? $clog2(DIM) : 0;

  // tree[level][k]: the k-th partial sum at a level; level 0 holds |w-x|.
  f32_t [DIM-1:0] tree [LEVELS+1];

  for (genvar i = 0; i < DIM; i++) begin : g_lane
    f32_t diff;
    fp_add u_sub (.a(w[i]), .b(x[i]), .sub(1'b1), .y(diff));
    assign tree[0][i] = f32_abs(diff);
  end

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    // number of terms at this level
    localparam int unsigned N_IN  = (DIM + (1 << lv) - 1) >> lv;
    localparam int unsigned N_OUT = (N_IN + 1) / 2;
    for (genvar k = 0; k < DIM; k++) begin : g_node
      if (k < N_IN / 2) begin : g_add
        fp_add u_add (.a(tree[lv][2*k]), .b(tree[lv][2*k+1]), .sub(1'b0), .y(tree[lv+1][k]));
      end else if (k == N_OUT - 1 && (N_IN % 2) == 1) begin : g_pass
        assign tree[lv+1][k] = tree[lv][2*k];
      end else begin : g_unused
        assign tree[lv+1][k] = F32_ZERO;
      end
    end
  end

  assign dist_out = tree[LEVELS][0];

endmodule
