// local_ram: on-chip local memory of the SOM kernels.
//
// The SOMComp kernel copies the map and the input set from global memory
// into local memory before computing, because local memory has far lower
// latency and higher bandwidth. Here each word holds one whole vector
// (LANES floats, one per dimension) so that all DIM lanes of the distance
// and update datapaths are served in one access. One write port with a
// write enable per lane (used when a vector arrives float by float from
// global memory, or a whole row is written back by the update) and one read
// port with one cycle of latency: rdata shows the word addressed in the
// previous cycle. Reading and writing the same word in one cycle returns
// the old contents. Contents are not reset. The vector-wide organisation
// is this design's own choice.
module local_ram
  import som_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned LANES = 3,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                we_valid,
  input  logic [LANES-1:0]    we_lane,
  input  logic [AW-1:0]       waddr,
  input  f32_t [LANES-1:0]    wdata,
  input  logic [AW-1:0]       raddr,
  output f32_t [LANES-1:0]    rdata
);

  f32_t [LANES-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_valid)
      for (int l = 0; l < LANES; l++)
        if (we_lane[l]) mem[waddr][l] <= wdata[l];
    rdata <= mem[raddr];
  end

endmodule
