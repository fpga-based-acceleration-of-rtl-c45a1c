// tb_som_full: the accelerator at its full size, one training iteration.
//
// som_accel_top with its default parameters (16x16 map, 5120 inputs of 3
// dimensions): random map and inputs in 0..10000 and a Gaussian-shaped NR
// vector are placed in two memory models, SOMComp runs one complete pass
// over all 5120 inputs, then NeigRed runs once. The BMU of every input,
// the whole map written back and the shifted NR vector are compared with
// the reference model, and the per-input schedule (2*T+7 cycles) and total
// cycle count are reported.
module tb_som_full;
  import som_pkg::*;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  localparam int S = 16, N = 5120, D = 3, T = S * S;
  localparam int MAP_BASE = 0, NR_BASE = 1000, IN_BASE = 0;

  logic clk = 0, rst = 1;
  logic comp_start, neig_start, comp_busy, comp_done, neig_busy, neig_done;
  logic bmu_valid, mux_owner, mux_switched;
  logic [7:0] bmu_idx;
  f32_t bmu_dist;
  gmem_req_t bank1_req, bank2_req;
  gmem_rsp_t bank1_rsp, bank2_rsp;
  int stalls1, stalls2;
  int checks = 0, failures = 0;

  som_accel_top dut (
    .clk(clk), .rst(rst), .comp_start(comp_start), .neig_start(neig_start),
    .map_base(MAP_BASE), .input_base(IN_BASE), .nr_base(NR_BASE),
    .comp_busy(comp_busy), .comp_done(comp_done), .neig_busy(neig_busy), .neig_done(neig_done),
    .bmu_valid(bmu_valid), .bmu_idx(bmu_idx), .bmu_dist(bmu_dist),
    .mux_owner(mux_owner), .mux_switched(mux_switched),
    .bank1_req(bank1_req), .bank1_rsp(bank1_rsp), .bank2_req(bank2_req), .bank2_rsp(bank2_rsp));
  gmem_model #(.DEPTH(1024), .LATENCY(6), .STALL_PCT(10)) bank1 (
    .clk(clk), .rst(rst), .req_i(bank1_req), .rsp_o(bank1_rsp), .stalls(stalls1));
  gmem_model #(.DEPTH(16384), .LATENCY(6), .STALL_PCT(10)) bank2 (
    .clk(clk), .rst(rst), .req_i(bank2_req), .rsp_o(bank2_rsp), .stalls(stalls2));

  always #5 clk = ~clk;

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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_t map[], inp[], nr[];
    int bmu[];
    int t0, t1;
    map = new[T*D]; inp = new[N*D]; nr = new[S];
    foreach (map[i]) map[i] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
    foreach (inp[i]) inp[i] = real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
    for (int i = 0; i < S; i++) nr[i] = real_to_f32(0.5 * $exp(-real'(i*i) / 18.0));
    foreach (map[i]) bank1.mem[MAP_BASE + i] = map[i];
    foreach (nr[i])  bank1.mem[NR_BASE + i] = nr[i];
    foreach (inp[i]) bank2.mem[IN_BASE + i] = inp[i];
    comp_start = 0; neig_start = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); comp_start = 1; t0 = cycle;
    @(negedge clk); comp_start = 0;
    wait (comp_done);
    t1 = cycle;
    @(negedge clk);
    $display("SOMComp pass: %0d cycles for %0d inputs on a %0dx%0d map", t1 - t0, N, S, S);
    ref_pass(S, D, N, map, inp, nr, bmu);
    checks++;
    if (got_bmu.size() != N) begin failures++; $display("%0d BMU reports", got_bmu.size()); end
    for (int i = 0; i < N && i < got_bmu.size(); i++) begin
      checks++;
      if (got_bmu[i] != bmu[i]) begin
        failures++;
        if (failures < 10) $display("input %0d: BMU %0d expected %0d", i, got_bmu[i], bmu[i]);
      end
    end
    foreach (map[i]) begin
      checks++;
      if (!f32_same(bank1.mem[MAP_BASE + i], map[i])) begin
        failures++;
        if (failures < 10) $display("map[%0d] %h expected %h", i, bank1.mem[MAP_BASE+i], map[i]);
      end
    end
    @(negedge clk); neig_start = 1;
    @(negedge clk); neig_start = 0;
    wait (neig_done);
    @(negedge clk);
    ref_neigred(nr);
    foreach (nr[i]) begin
      checks++;
      if (bank1.mem[NR_BASE + i] != nr[i]) begin failures++; $display("NR[%0d] wrong", i); end
    end
    checks++;
    if (gap_bad != 0) begin failures++; $display("%0d inputs off the 2T+7 schedule", gap_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
