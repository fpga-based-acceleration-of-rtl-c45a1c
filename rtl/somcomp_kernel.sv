// somcomp_kernel: the SOMComp kernel, one SOM training pass in hardware.
//
// After start the kernel copies the map (MAP_SIDE*MAP_SIDE neurons of DIM
// floats), the whole input set (INPUT_SIZE vectors of DIM floats) and the
// neighbourhood-reduction vector NR (MAP_SIDE floats) from global memory
// into local memory, the map and NR through bank-1 port m1 and the inputs
// through bank-2 port m2, both streams running at once. Then, for every
// input vector in order:
//   1. DIST: the map is streamed one neuron per cycle through
//      manhattan_dist and bmu_search (two pipeline stages); the neuron
//      with the smallest Manhattan distance is the BMU, ties to the lowest
//      index. The BMU is reported on bmu_valid/bmu_idx/bmu_dist.
//   2. UPDATE: the map is streamed again through weight_update, which
//      moves each neuron towards the input by NR[max(|dx|,|dy|)] and
//      writes the row straight back (read row j while writing row j-1).
// Finally the map is written back to global memory float by float and
// done pulses for one cycle. Work per input is 2*T+7 cycles
// (T = MAP_SIDE*MAP_SIDE) when nothing stalls; loads and the write-back
// take one float per accepted request and wait whenever gnt is low.
//
// The algorithm, the Manhattan distance, the Chebyshev neighbourhood index,
// the update formula, the all-local-memory organisation and the three
// buffers follow the accelerator's kernel. The pipeline, the one-neuron-
// per-cycle schedule, the memory port protocol, the bank assignment of the
// buffers and the synchronous active-high reset are this design's choices.
// The BMU search restarts from neuron 0 for every input.
module somcomp_kernel
  import som_pkg::*;
#(
  parameter int unsigned MAP_SIDE   = 16,
  parameter int unsigned INPUT_SIZE = 5120,
  parameter int unsigned DIM        = 3,
  localparam int unsigned T   = MAP_SIDE * MAP_SIDE,
  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned CW  = (MAP_SIDE > 1) ? $clog2(MAP_SIDE) : 1
) (
  input  logic      clk,
  input  logic      rst,
  // kernel launch (kernel arguments are the three buffer base addresses)
  input  logic      start,
  input  gaddr_t    map_base,
  input  gaddr_t    input_base,
  input  gaddr_t    nr_base,
  output logic      busy,
  output logic      done,
  // global memory, bank 1 (map, NR) and bank 2 (inputs)
  output gmem_req_t m1_req,
  input  gmem_rsp_t m1_rsp,
  output gmem_req_t m2_req,
  input  gmem_rsp_t m2_rsp,
  // BMU of each input, for observation
  output logic          bmu_valid,
  output logic [TW-1:0] bmu_idx,
  output f32_t          bmu_dist
);

  localparam int unsigned NW_MAP = T * DIM;
  localparam int unsigned NW_IN  = INPUT_SIZE * DIM;
  localparam int unsigned NW_B1  = NW_MAP + MAP_SIDE;
  localparam int unsigned NIW    = (INPUT_SIZE > 1) ? $clog2(INPUT_SIZE) : 1;
  localparam int unsigned LW     = (DIM > 1) ? $clog2(DIM) : 1;
  localparam int unsigned CNTW   = $clog2(NW_MAP + NW_IN + MAP_SIDE + 1) + 1;

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_FETCH_X, S_DIST, S_UPDATE, S_NEXT,
    S_STORE_RD, S_STORE_WR, S_DONE
  } state_t;

  state_t state;

  // arguments
  gaddr_t map_base_q, input_base_q, nr_base_q;

  // load counters
  logic [CNTW-1:0] iss1, rcv1, iss2, rcv2;
  logic [TW-1:0]   ld1_row;
  logic [LW-1:0]   ld1_lane;
  logic [NIW-1:0]  ld2_row;
  logic [LW-1:0]   ld2_lane;
  logic [CW-1:0]   nr_wr;

  f32_t [MAP_SIDE-1:0] nr;  // NR vector (private copy, registers)

  // per-input loop
  logic [NIW-1:0] n_q;
  logic [TW:0]    j_q;          // neuron issue counter, 0..T
  logic [CW-1:0]  jx_q, jy_q;   // its map coordinates

  // store
  logic [TW-1:0] st_row;
  logic [LW-1:0] st_lane;
  gaddr_t        st_addr;

  // local memories
  logic               map_we;
  logic [DIM-1:0]     map_we_lane;
  logic [TW-1:0]      map_waddr, map_raddr;
  f32_t [DIM-1:0]     map_wdata, map_rdata;
  logic               in_we;
  logic [DIM-1:0]     in_we_lane;
  f32_t [DIM-1:0]     in_wdata, x_vec;

  local_ram #(.DEPTH(T), .LANES(DIM)) u_map_ram (
    .clk(clk), .we_valid(map_we), .we_lane(map_we_lane), .waddr(map_waddr),
    .wdata(map_wdata), .raddr(map_raddr), .rdata(map_rdata));

  local_ram #(.DEPTH(INPUT_SIZE), .LANES(DIM)) u_in_ram (
    .clk(clk), .we_valid(in_we), .we_lane(in_we_lane), .waddr(ld2_row),
    .wdata(in_wdata), .raddr(n_q), .rdata(x_vec));

  // distance pipeline
  logic          p1_valid, p1_first;
  logic [TW-1:0] p1_idx;
  logic          p2_valid, p2_first;
  logic [TW-1:0] p2_idx;
  f32_t          p2_dist, dist_c;
  f32_t          best_dist;
  logic [TW-1:0] best_idx;

  manhattan_dist #(.DIM(DIM)) u_dist (.w(map_rdata), .x(x_vec), .dist_out(dist_c));

  bmu_search #(.NEURONS(T)) u_bmu (
    .clk(clk), .rst(rst), .valid(p2_valid), .first(p2_first), .cand_dist(p2_dist),
    .idx(p2_idx), .best_dist(best_dist), .best_idx(best_idx));

  // update pipeline
  logic          u1_valid;
  logic [TW-1:0] u1_idx;
  logic [CW-1:0] u1_x, u1_y;
  logic [CW-1:0] bx, by, nbh;
  f32_t [DIM-1:0] w_new;

  assign bx = CW'(best_idx % TW'(MAP_SIDE));
  assign by = CW'(best_idx / TW'(MAP_SIDE));

  weight_update #(.MAP_SIDE(MAP_SIDE), .DIM(DIM)) u_upd (
    .nx(u1_x), .ny(u1_y), .bx(bx), .by(by), .nr(nr), .w(map_rdata), .x(x_vec),
    .nbh(nbh), .w_new(w_new));

  logic issuing_d, issuing_u, dist_end, upd_end;
  assign issuing_d = (state == S_DIST)   && (j_q < (TW+1)'(T));
  assign issuing_u = (state == S_UPDATE) && (j_q < (TW+1)'(T));
  assign dist_end  = (state == S_DIST)   && !issuing_d && !p1_valid && !p2_valid;
  assign upd_end   = (state == S_UPDATE) && !issuing_u && !u1_valid;

  // ---------------------------------------------------------------- memory ports
  always_comb begin
    m1_req = '0;
    m2_req = '0;
    if (state == S_LOAD) begin
      m1_req.req  = (iss1 < CNTW'(NW_B1));
      m1_req.addr = (iss1 < CNTW'(NW_MAP)) ? map_base_q + gaddr_t'(iss1)
                                           : nr_base_q + gaddr_t'(iss1) - gaddr_t'(NW_MAP);
      m2_req.req  = (iss2 < CNTW'(NW_IN));
      m2_req.addr = input_base_q + gaddr_t'(iss2);
    end else if (state == S_STORE_WR) begin
      m1_req.req   = 1'b1;
      m1_req.we    = 1'b1;
      m1_req.addr  = st_addr;
      m1_req.wdata = map_rdata[st_lane];
    end
  end

  // ---------------------------------------------------------------- local memory ports
  always_comb begin
    map_we      = 1'b0;
    map_we_lane = '0;
    map_waddr   = ld1_row;
    map_wdata   = '0;
    if (state == S_LOAD) begin
      map_we                = m1_rsp.rvalid && (rcv1 < CNTW'(NW_MAP));
      map_we_lane[ld1_lane] = 1'b1;
      for (int l = 0; l < DIM; l++) map_wdata[l] = m1_rsp.rdata;
    end else if (u1_valid) begin
      map_we      = 1'b1;
      map_we_lane = '1;
      map_waddr   = u1_idx;
      map_wdata   = w_new;
    end

    in_we                 = (state == S_LOAD) && m2_rsp.rvalid;
    in_we_lane            = '0;
    in_we_lane[ld2_lane]  = 1'b1;
    for (int l = 0; l < DIM; l++) in_wdata[l] = m2_rsp.rdata;

    if (state == S_STORE_RD || state == S_STORE_WR) map_raddr = st_row;
    else                                            map_raddr = j_q[TW-1:0];
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      map_base_q   <= '0;
      input_base_q <= '0;
      nr_base_q    <= '0;
      iss1 <= '0; rcv1 <= '0; iss2 <= '0; rcv2 <= '0;
      ld1_row <= '0; ld1_lane <= '0; ld2_row <= '0; ld2_lane <= '0;
      nr_wr <= '0;
      nr    <= '0;
      n_q   <= '0;
      j_q   <= '0; jx_q <= '0; jy_q <= '0;
      st_row <= '0; st_lane <= '0; st_addr <= '0;
      p1_valid <= 1'b0; p1_first <= 1'b0; p1_idx <= '0;
      p2_valid <= 1'b0; p2_first <= 1'b0; p2_idx <= '0; p2_dist <= '0;
      u1_valid <= 1'b0; u1_idx <= '0; u1_x <= '0; u1_y <= '0;
      done      <= 1'b0;
      bmu_valid <= 1'b0;
      bmu_idx   <= '0;
      bmu_dist  <= '0;
    end else begin
      done      <= 1'b0;
      bmu_valid <= 1'b0;

      // pipeline registers
      p1_valid <= issuing_d;
      p1_first <= (j_q == '0);
      p1_idx   <= j_q[TW-1:0];
      p2_valid <= p1_valid;
      p2_first <= p1_first;
      p2_idx   <= p1_idx;
      p2_dist  <= dist_c;
      u1_valid <= issuing_u;
      u1_idx   <= j_q[TW-1:0];
      u1_x     <= jx_q;
      u1_y     <= jy_q;

      if (issuing_d || issuing_u) begin
        j_q <= j_q + 1'b1;
        if (jx_q == CW'(MAP_SIDE - 1)) begin
          jx_q <= '0;
          jy_q <= jy_q + 1'b1;
        end else begin
          jx_q <= jx_q + 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            map_base_q   <= map_base;
            input_base_q <= input_base;
            nr_base_q    <= nr_base;
            iss1 <= '0; rcv1 <= '0; iss2 <= '0; rcv2 <= '0;
            ld1_row <= '0; ld1_lane <= '0; ld2_row <= '0; ld2_lane <= '0;
            nr_wr <= '0;
            state <= S_LOAD;
          end
        end

        S_LOAD: begin
          if (m1_req.req && m1_rsp.gnt) iss1 <= iss1 + 1'b1;
          if (m2_req.req && m2_rsp.gnt) iss2 <= iss2 + 1'b1;
          if (m1_rsp.rvalid) begin
            rcv1 <= rcv1 + 1'b1;
            if (rcv1 < CNTW'(NW_MAP)) begin
              if (ld1_lane == LW'(DIM - 1)) begin
                ld1_lane <= '0;
                ld1_row  <= ld1_row + 1'b1;
              end else begin
                ld1_lane <= ld1_lane + 1'b1;
              end
            end else begin
              nr[nr_wr] <= m1_rsp.rdata;
              nr_wr     <= nr_wr + 1'b1;
            end
          end
          if (m2_rsp.rvalid) begin
            rcv2 <= rcv2 + 1'b1;
            if (ld2_lane == LW'(DIM - 1)) begin
              ld2_lane <= '0;
              ld2_row  <= ld2_row + 1'b1;
            end else begin
              ld2_lane <= ld2_lane + 1'b1;
            end
          end
          if (rcv1 == CNTW'(NW_B1) && rcv2 == CNTW'(NW_IN)) begin
            n_q   <= '0;
            state <= S_FETCH_X;
          end
        end

        S_FETCH_X: begin  // x_vec follows n_q one cycle later
          j_q  <= '0;
          jx_q <= '0;
          jy_q <= '0;
          state <= S_DIST;
        end

        S_DIST: begin
          if (dist_end) begin
            bmu_valid <= 1'b1;
            bmu_idx   <= best_idx;
            bmu_dist  <= best_dist;
            j_q  <= '0;
            jx_q <= '0;
            jy_q <= '0;
            state <= S_UPDATE;
          end
        end

        S_UPDATE: begin
          if (upd_end) state <= S_NEXT;
        end

        S_NEXT: begin
          if (n_q == NIW'(INPUT_SIZE - 1)) begin
            st_row  <= '0;
            st_lane <= '0;
            st_addr <= map_base_q;
            state   <= S_STORE_RD;
          end else begin
            n_q   <= n_q + 1'b1;
            state <= S_FETCH_X;
          end
        end

        S_STORE_RD: state <= S_STORE_WR;  // map_rdata follows st_row

        S_STORE_WR: begin
          if (m1_rsp.gnt) begin
            st_addr <= st_addr + 1'b1;
            if (st_lane == LW'(DIM - 1)) begin
              st_lane <= '0;
              if (st_row == TW'(T - 1)) begin
                state <= S_DONE;
              end else begin
                st_row <= st_row + 1'b1;
                state  <= S_STORE_RD;
              end
            end else begin
              st_lane <= st_lane + 1'b1;
            end
          end
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
