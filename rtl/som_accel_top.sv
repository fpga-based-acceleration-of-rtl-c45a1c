// som_accel_top: the SOM accelerator kernel system.
//
// Holds the two kernels of the accelerator: SOMComp (one full training
// pass over the input set: BMU search by Manhattan distance and
// neighbourhood update) and NeigRed (shrinks the neighbourhood-reduction
// vector between passes). The host launches them one after the other, once
// per training iteration: SOMComp, then NeigRed. Global memory has two
// banks: bank 1 holds the map and the NR vector and is shared by both
// kernels through gmem_mux; bank 2 holds the input set and is read by
// SOMComp only. The banks themselves (DDR3 with its controller), PCIe and
// the host are outside this module; their signals are the ports.
//
// Kernel launch: pulse comp_start or neig_start for one cycle with the
// buffer base addresses (word addresses) valid; *_busy stays high until the
// one-cycle *_done pulse. bmu_* report the winner of every input during a
// SOMComp run. mux_owner/mux_switched expose the bank-1 arbitration.
module som_accel_top
  import som_pkg::*;
#(
  parameter int unsigned MAP_SIDE   = 16,
  parameter int unsigned INPUT_SIZE = 5120,
  parameter int unsigned DIM        = 3,
  localparam int unsigned TW = (MAP_SIDE * MAP_SIDE > 1) ? $clog2(MAP_SIDE * MAP_SIDE) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          comp_start,
  input  logic          neig_start,
  input  gaddr_t        map_base,
  input  gaddr_t        input_base,
  input  gaddr_t        nr_base,
  output logic          comp_busy,
  output logic          comp_done,
  output logic          neig_busy,
  output logic          neig_done,
  output logic          bmu_valid,
  output logic [TW-1:0] bmu_idx,
  output f32_t          bmu_dist,
  output logic          mux_owner,
  output logic          mux_switched,
  output gmem_req_t     bank1_req,
  input  gmem_rsp_t     bank1_rsp,
  output gmem_req_t     bank2_req,
  input  gmem_rsp_t     bank2_rsp
);

  gmem_req_t comp_m1_req, neig_req;
  gmem_rsp_t comp_m1_rsp, neig_rsp;

  somcomp_kernel #(.MAP_SIDE(MAP_SIDE), .INPUT_SIZE(INPUT_SIZE), .DIM(DIM)) u_somcomp (
    .clk(clk), .rst(rst), .start(comp_start),
    .map_base(map_base), .input_base(input_base), .nr_base(nr_base),
    .busy(comp_busy), .done(comp_done),
    .m1_req(comp_m1_req), .m1_rsp(comp_m1_rsp),
    .m2_req(bank2_req), .m2_rsp(bank2_rsp),
    .bmu_valid(bmu_valid), .bmu_idx(bmu_idx), .bmu_dist(bmu_dist));

  neigred_kernel #(.MAP_SIDE(MAP_SIDE)) u_neigred (
    .clk(clk), .rst(rst), .start(neig_start), .nr_base(nr_base),
    .busy(neig_busy), .done(neig_done),
    .m_req(neig_req), .m_rsp(neig_rsp));

  gmem_mux u_bank1_mux (
    .clk(clk), .rst(rst),
    .m0_req(comp_m1_req), .m0_rsp(comp_m1_rsp),
    .m1_req(neig_req), .m1_rsp(neig_rsp),
    .s_req(bank1_req), .s_rsp(bank1_rsp),
    .owner(mux_owner), .switched(mux_switched));

endmodule
