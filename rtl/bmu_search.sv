// bmu_search: running search for the Best Matching Unit.
//
// The neuron distances of one input arrive one per cycle (valid). The
// first one (first high) is taken as the current winner, as the kernel
// starts from the distance of neuron 0; each later one replaces the winner
// only if it is strictly smaller, so among equal distances the lowest index
// wins. best_dist / best_idx hold the result until the next first. The
// comparison is the binary32 less-than of som_pkg. Reset clears both
// outputs.
module bmu_search
  import som_pkg::*;
#(
  parameter int unsigned NEURONS = 256,
  localparam int unsigned IW = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic          first,
  input  f32_t          cand_dist,
  input  logic [IW-1:0] idx,
  output f32_t          best_dist,
  output logic [IW-1:0] best_idx
);

  always_ff @(posedge clk) begin
    if (rst) begin
      best_dist <= F32_ZERO;
      best_idx  <= '0;
    end else if (valid && (first || f32_lt(cand_dist, best_dist))) begin
      best_dist <= cand_dist;
      best_idx  <= idx;
    end
  end

endmodule
