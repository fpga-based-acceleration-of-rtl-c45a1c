// gmem_model: behavioural model of one global-memory bank (testbench only).
//
// Stands in for an off-chip DDR3 bank and its controller. A request is
// accepted when req and gnt are both high; gnt is drawn at random each
// cycle and is low STALL_PCT percent of the time, so masters see
// back-pressure. Reads return in order exactly LATENCY cycles after they
// are accepted; writes take effect at the accepting clock edge. The array
// mem is public so a testbench can fill and inspect it. Addresses wrap at
// DEPTH. stalls counts cycles in which a request was refused.
module gmem_model
  import som_pkg::*;
#(
  parameter int DEPTH     = 4096,
  parameter int LATENCY   = 4,
  parameter int STALL_PCT = 20
) (
  input  logic      clk,
  input  logic      rst,
  input  gmem_req_t req_i,
  output gmem_rsp_t rsp_o,
  output int        stalls
);

  f32_t mem [DEPTH];
  logic gnt_r;
  logic [LATENCY-1:0] v_pipe;
  f32_t               d_pipe [LATENCY];

  assign rsp_o.gnt    = gnt_r;
  assign rsp_o.rvalid = v_pipe[LATENCY-1];
  assign rsp_o.rdata  = d_pipe[LATENCY-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      gnt_r  <= 1'b0;
      v_pipe <= '0;
      stalls <= 0;
      for (int i = 0; i < LATENCY; i++) d_pipe[i] <= '0;
    end else begin
      gnt_r <= ($urandom_range(0, 99) >= STALL_PCT);
      if (req_i.req && !gnt_r) stalls <= stalls + 1;
      for (int i = LATENCY - 1; i > 0; i--) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
      v_pipe[0] <= req_i.req && gnt_r && !req_i.we;
      d_pipe[0] <= mem[req_i.addr % DEPTH];
      if (req_i.req && gnt_r && req_i.we) mem[req_i.addr % DEPTH] <= req_i.wdata;
    end
  end

endmodule
