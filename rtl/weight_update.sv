// weight_update: neighbourhood weight update of one neuron.
//
// For the neuron at map position (nx, ny) and the BMU at (bx, by) the
// neighbourhood index is the Chebyshev distance max(|nx-bx|, |ny-by|),
// which runs from 0 to MAP_SIDE-1 and selects one coefficient of the
// neighbourhood-reduction (NR) vector. Each of the DIM lanes then becomes
// w - (w - x) * NR[index], with every operation rounded to binary32 in
// that order. The NR vector combines learning rate and neighbourhood
// shape; once the NeigRed kernel has shifted zeros into its tail, neurons
// far from the BMU get a zero coefficient and keep their weights.
// Combinational.
module weight_update
  import som_pkg::*;
#(
  parameter int unsigned MAP_SIDE = 16,
  parameter int unsigned DIM      = 3,
  localparam int unsigned CW = (MAP_SIDE > 1) ? $clog2(MAP_SIDE) : 1
) (
  input  logic [CW-1:0]       nx,
  input  logic [CW-1:0]       ny,
  input  logic [CW-1:0]       bx,
  input  logic [CW-1:0]       by,
  input  f32_t [MAP_SIDE-1:0] nr,
  input  f32_t [DIM-1:0]      w,
  input  f32_t [DIM-1:0]      x,
  output logic [CW-1:0]       nbh,
  output f32_t [DIM-1:0]      w_new
);

  logic [CW-1:0] dx, dy;
  f32_t          coef;

  always_comb begin
    dx   = (nx >= bx) ? nx - bx : bx - nx;
    dy   = (ny >= by) ? ny - by : by - ny;
    nbh  = (dx >= dy) ? dx : dy;
    coef = nr[nbh];
  end

  for (genvar i = 0; i < DIM; i++) begin : g_lane
    f32_t diff, step;
    fp_add u_diff (.a(w[i]), .b(x[i]), .sub(1'b1), .y(diff));
    fp_mul u_mul  (.a(diff), .b(coef), .y(step));
    fp_add u_new  (.a(w[i]), .b(step), .sub(1'b1), .y(w_new[i]));
  end

endmodule
