// som_workload_run: one SOM training iteration on one configuration
// (testbench helper).
//
// Builds som_accel_top with the given MAP_SIDE, INPUT_SIZE and DIM, two
// memory models, random map and inputs in 0..10000 and a Gaussian-shaped
// NR vector. After go it runs SOMComp over all inputs and then NeigRed,
// compares every BMU, the written-back map and the shifted NR vector with
// the reference model, and checks the 2*T+7-cycle schedule per input. It
// then raises finished with its check and failure counts and the cycle
// count of the SOMComp pass.
module som_workload_run
  import som_pkg::*;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;
#(
  parameter int S = 8,
  parameter int N = 64,
  parameter int D = 3
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   pass_cycles
);

  localparam int T = S * S;
  localparam int MAP_BASE = 0, NR_BASE = 3000, IN_BASE = 0;

  logic rst = 1;
  logic comp_start = 0, neig_start = 0;
  logic comp_busy, comp_done, neig_busy, neig_done, bmu_valid, mux_owner, mux_switched;
  logic [$clog2(T)-1:0] bmu_idx;
  f32_t bmu_dist;
  gmem_req_t bank1_req, bank2_req;
  gmem_rsp_t bank1_rsp, bank2_rsp;
  int stalls1, stalls2;

  som_accel_top #(.MAP_SIDE(S), .INPUT_SIZE(N), .DIM(D)) dut (
    .clk(clk), .rst(rst), .comp_start(comp_start), .neig_start(neig_start),
    .map_base(MAP_BASE), .input_base(IN_BASE), .nr_base(NR_BASE),
    .comp_busy(comp_busy), .comp_done(comp_done), .neig_busy(neig_busy), .neig_done(neig_done),
    .bmu_valid(bmu_valid), .bmu_idx(bmu_idx), .bmu_dist(bmu_dist),
    .mux_owner(mux_owner), .mux_switched(mux_switched),
    .bank1_req(bank1_req), .bank1_rsp(bank1_rsp), .bank2_req(bank2_req), .bank2_rsp(bank2_rsp));
  gmem_model #(.DEPTH(4096), .LATENCY(5), .STALL_PCT(10)) bank1 (
    .clk(clk), .rst(rst), .req_i(bank1_req), .rsp_o(bank1_rsp), .stalls(stalls1));
  gmem_model #(.DEPTH(32768), .LATENCY(5), .STALL_PCT(10)) bank2 (
    .clk(clk), .rst(rst), .req_i(bank2_req), .rsp_o(bank2_rsp), .stalls(stalls2));

  int got_bmu [$];
  int cycle = 0, last_bmu_cycle = 0, gap_bad = 0;
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (bmu_valid && !rst) begin
      got_bmu.push_back(int'(bmu_idx));
      if (got_bmu.size() > 1 && cycle - last_bmu_cycle != 2*T + 7) gap_bad <= gap_bad + 1;
      last_bmu_cycle <= cycle;
    end
  end

  initial begin
    f_t map[], inp[], nr[];
    int bmu[];
    int t0;
    finished = 0; checks = 0; failures = 0; pass_cycles = 0;
    map = new[T*D]; inp = new[N*D]; nr = new[S];
    foreach (map[i]) map[i] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
    foreach (inp[i]) inp[i] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
    for (int i = 0; i < S; i++) nr[i] = real_to_f32(0.5 * $exp(-real'(i*i) / (2.0 * real'(S*S) / 16.0)));
    foreach (map[i]) bank1.mem[MAP_BASE + i] = map[i];
    foreach (nr[i])  bank1.mem[NR_BASE + i] = nr[i];
    foreach (inp[i]) bank2.mem[IN_BASE + i] = inp[i];
    wait (go);
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); comp_start = 1; t0 = cycle;
    @(negedge clk); comp_start = 0;
    wait (comp_done);
    pass_cycles = cycle - t0;
    @(negedge clk);
    ref_pass(S, D, N, map, inp, nr, bmu);
    checks++;
    if (got_bmu.size() != N) failures++;
    for (int i = 0; i < N && i < got_bmu.size(); i++) begin
      checks++;
      if (got_bmu[i] != bmu[i]) failures++;
    end
    foreach (map[i]) begin
      checks++;
      if (!f32_same(bank1.mem[MAP_BASE + i], map[i])) failures++;
    end
    @(negedge clk); neig_start = 1;
    @(negedge clk); neig_start = 0;
    wait (neig_done);
    @(negedge clk);
    ref_neigred(nr);
    foreach (nr[i]) begin
      checks++;
      if (bank1.mem[NR_BASE + i] != nr[i]) failures++;
    end
    checks++;
    if (gap_bad != 0) failures++;
    finished = 1;
  end

endmodule
