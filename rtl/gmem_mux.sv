// gmem_mux: shares one global-memory port between two kernel masters.
//
// Both kernels use buffers in memory bank 1 (SOMComp the map and NR
// vector, NeigRed the NR vector), so their bank-1 ports meet here. The mux
// has one owner at a time: only the owner's requests reach memory and only
// it sees gnt and the read responses. Ownership passes to the other master
// when the owner is not requesting, has no read outstanding and the other
// one requests; the change takes one cycle, during which nothing is
// granted. Master 0 owns the port after reset. The outstanding-read count
// lets responses, which return in order, always go to the master that
// asked. The kernels normally run one after the other, as the host
// launches them, so the mux rarely has to wait. The arbitration scheme is
// this design's own; the real interconnect was generated by the tools.
module gmem_mux
  import som_pkg::*;
#(
  parameter int unsigned MAX_OUTSTANDING = 1024
) (
  input  logic      clk,
  input  logic      rst,
  input  gmem_req_t m0_req,
  output gmem_rsp_t m0_rsp,
  input  gmem_req_t m1_req,
  output gmem_rsp_t m1_rsp,
  output gmem_req_t s_req,
  input  gmem_rsp_t s_rsp,
  output logic      owner,
  output logic      switched
);

  localparam int unsigned OW = $clog2(MAX_OUTSTANDING + 1);

  logic [OW-1:0] outstanding;
  gmem_req_t     own_req, oth_req;
  logic          accept_rd;

  assign own_req = owner ? m1_req : m0_req;
  assign oth_req = owner ? m0_req : m1_req;

  always_comb begin
    s_req     = own_req;
    // hold back a read that could overflow the outstanding counter
    if (!own_req.we && outstanding == OW'(MAX_OUTSTANDING)) s_req.req = 1'b0;
    m0_rsp    = '0;
    m1_rsp    = '0;
    if (owner) begin
      m1_rsp     = s_rsp;
      m1_rsp.gnt = s_rsp.gnt && s_req.req;
    end else begin
      m0_rsp     = s_rsp;
      m0_rsp.gnt = s_rsp.gnt && s_req.req;
    end
    accept_rd = s_req.req && !s_req.we && s_rsp.gnt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      owner       <= 1'b0;
      outstanding <= '0;
      switched    <= 1'b0;
    end else begin
      switched <= 1'b0;
      outstanding <= outstanding + OW'(accept_rd) - OW'(s_rsp.rvalid);
      if (!own_req.req && outstanding == '0 && !s_rsp.rvalid && oth_req.req) begin
        owner    <= !owner;
        switched <= 1'b1;
      end
    end
  end

  // a read response must belong to an outstanding read
  a_no_stray_rsp: assert property (@(posedge clk) disable iff (rst)
    s_rsp.rvalid |-> (outstanding != '0));

endmodule
