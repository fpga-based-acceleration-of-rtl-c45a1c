// neigred_kernel: the NeigRed kernel, neighbourhood and learning-rate decay.
//
// Between SOMComp runs this kernel shrinks the neighbourhood: it reads the
// MAP_SIDE-entry neighbourhood-reduction vector NR from global memory into
// registers, moves every entry one place down (NR[i-1] <- NR[i]), puts
// zero in the last entry and writes the vector back. Since NR is indexed
// by the distance from the BMU, the coefficient at each distance becomes
// the one that was further out, and after k runs neurons k or fewer steps
// from the edge of the vector get no update at all.
//
// Timing: after start, MAP_SIDE reads are issued (one per accepted
// request), then one cycle shifts the vector, then MAP_SIDE writes are
// issued and done pulses for one cycle. The shift and the zero fill follow
// the accelerator's kernel; the port protocol and FSM are this design's.
module neigred_kernel
  import som_pkg::*;
#(
  parameter int unsigned MAP_SIDE = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  gaddr_t    nr_base,
  output logic      busy,
  output logic      done,
  output gmem_req_t m_req,
  input  gmem_rsp_t m_rsp
);

  localparam int unsigned KW = $clog2(MAP_SIDE + 1);

  typedef enum logic [2:0] {N_IDLE, N_LOAD, N_SHIFT, N_STORE, N_DONE} state_t;

  state_t              state;
  gaddr_t              base_q;
  logic [KW-1:0]       iss, rcv;
  f32_t [MAP_SIDE-1:0] nr;

  always_comb begin
    m_req = '0;
    if (state == N_LOAD) begin
      m_req.req  = (iss < KW'(MAP_SIDE));
      m_req.addr = base_q + gaddr_t'(iss);
    end else if (state == N_STORE) begin
      m_req.req   = 1'b1;
      m_req.we    = 1'b1;
      m_req.addr  = base_q + gaddr_t'(iss);
      m_req.wdata = nr[iss];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= N_IDLE;
      base_q <= '0;
      iss    <= '0;
      rcv    <= '0;
      nr     <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        N_IDLE: if (start) begin
          base_q <= nr_base;
          iss    <= '0;
          rcv    <= '0;
          state  <= N_LOAD;
        end
        N_LOAD: begin
          if (m_req.req && m_rsp.gnt) iss <= iss + 1'b1;
          if (m_rsp.rvalid) begin
            nr[rcv] <= m_rsp.rdata;
            rcv     <= rcv + 1'b1;
          end
          if (rcv == KW'(MAP_SIDE)) state <= N_SHIFT;
        end
        N_SHIFT: begin
          for (int i = 1; i < MAP_SIDE; i++) nr[i-1] <= nr[i];
          nr[MAP_SIDE-1] <= F32_ZERO;
          iss   <= '0;
          state <= N_STORE;
        end
        N_STORE: if (m_rsp.gnt) begin
          if (iss == KW'(MAP_SIDE - 1)) state <= N_DONE;
          iss <= iss + 1'b1;
        end
        N_DONE: begin
          done  <= 1'b1;
          state <= N_IDLE;
        end
        default: state <= N_IDLE;
      endcase
    end
  end

  assign busy = (state != N_IDLE);

endmodule
