// tb_som_accel_top: end-to-end test of the SOM accelerator kernel system.
//
// Acts as the host: places a random map (values 0..10000), a random input
// set and a Gaussian-shaped NR vector in two memory models with latency and
// random back-pressure, then runs ITER training iterations, each a SOMComp
// launch followed by a NeigRed launch. After every launch the memory
// contents (map, NR) and the BMU of every input are compared with the
// reference model. The mechanisms of the design are counted and each must
// occur: memory back-pressure on both banks, a change of bank-1 owner
// between the kernels, a BMU tie, BMUs away from neuron 0, neurons left
// unchanged by a zero NR coefficient after NeigRed has shifted zeros in,
// and the per-input schedule of 2*T+7 cycles.
module tb_som_accel_top;
  import som_pkg::*;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  localparam int S = 5, N = 24, D = 4, T = S * S, ITER = 4;
  localparam int MAP_BASE = 0, NR_BASE = 200, IN_BASE = 0;

  logic clk = 0, rst = 1;
  logic comp_start, neig_start, comp_busy, comp_done, neig_busy, neig_done;
  logic bmu_valid, mux_owner, mux_switched;
  logic [4:0] bmu_idx;
  f32_t bmu_dist;
  gmem_req_t bank1_req, bank2_req;
  gmem_rsp_t bank1_rsp, bank2_rsp;
  int stalls1, stalls2;
  int checks = 0, failures = 0;

  som_accel_top #(.MAP_SIDE(S), .INPUT_SIZE(N), .DIM(D)) dut (
    .clk(clk), .rst(rst), .comp_start(comp_start), .neig_start(neig_start),
    .map_base(MAP_BASE), .input_base(IN_BASE), .nr_base(NR_BASE),
    .comp_busy(comp_busy), .comp_done(comp_done), .neig_busy(neig_busy), .neig_done(neig_done),
    .bmu_valid(bmu_valid), .bmu_idx(bmu_idx), .bmu_dist(bmu_dist),
    .mux_owner(mux_owner), .mux_switched(mux_switched),
    .bank1_req(bank1_req), .bank1_rsp(bank1_rsp), .bank2_req(bank2_req), .bank2_rsp(bank2_rsp));
  gmem_model #(.DEPTH(256), .LATENCY(6), .STALL_PCT(25)) bank1 (
    .clk(clk), .rst(rst), .req_i(bank1_req), .rsp_o(bank1_rsp), .stalls(stalls1));
  gmem_model #(.DEPTH(128), .LATENCY(3), .STALL_PCT(15)) bank2 (
    .clk(clk), .rst(rst), .req_i(bank2_req), .rsp_o(bank2_rsp), .stalls(stalls2));

  always #5 clk = ~clk;

  int got_bmu [$];
  int cycle = 0, last_bmu_cycle = 0, gap_ok = 0, gap_bad = 0, switches = 0;
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (mux_switched && !rst) switches <= switches + 1;
    if (bmu_valid && !rst) begin
      got_bmu.push_back(int'(bmu_idx));
      if (got_bmu.size() > 1) begin
        if (cycle - last_bmu_cycle == 2*T + 7) gap_ok <= gap_ok + 1;
        else gap_bad <= gap_bad + 1;
      end
      last_bmu_cycle <= cycle;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic f_t rnd_val();
    return real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
  endfunction

  task automatic expect_mech(string name, int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin failures++; $display("mechanism never exercised: %s", name); end
  endtask

  initial begin
    f_t map[], inp[], nr[];
    int bmu[];
    int ties = 0, nonzero_bmu = 0, frozen = 0, neig_runs = 0;
    map = new[T*D]; inp = new[N*D]; nr = new[S];
    foreach (map[i]) map[i] = rnd_val();
    for (int l = 0; l < D; l++) map[7*D + l] = map[3*D + l];   // duplicate neuron
    foreach (inp[i]) inp[i] = rnd_val();
    for (int l = 0; l < D; l++) inp[l] = map[3*D + l];         // input 0 ties 3 and 7
    for (int i = 0; i < S; i++) nr[i] = real_to_f32(0.5 * $exp(-real'(i*i) / 4.5));
    foreach (map[i]) bank1.mem[MAP_BASE + i] = map[i];
    foreach (nr[i])  bank1.mem[NR_BASE + i] = nr[i];
    foreach (inp[i]) bank2.mem[IN_BASE + i] = inp[i];
    comp_start = 0; neig_start = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int it = 0; it < ITER; it++) begin
      // ---- SOMComp
      got_bmu = {};
      @(negedge clk); comp_start = 1;
      @(negedge clk); comp_start = 0;
      wait (comp_done);
      @(negedge clk);
      // zero-coefficient neurons in this pass (per input)
      begin
        f_t m2[];
        int b2[];
        m2 = map;
        ref_pass(S, D, N, m2, inp, nr, b2);
        for (int i = 0; i < N; i++)
          for (int j = 0; j < T; j++) if (nr[ref_nbh(S, j, b2[i])] == 32'd0) frozen++;
      end
      ref_pass(S, D, N, map, inp, nr, bmu);
      if (it == 0 && bmu[0] == 3) ties++;
      for (int i = 0; i < N; i++) if (bmu[i] != 0) nonzero_bmu++;
      checks++;
      if (got_bmu.size() != N) begin failures++; $display("iteration %0d: %0d BMU reports", it, got_bmu.size()); end
      for (int i = 0; i < N && i < got_bmu.size(); i++) begin
        checks++;
        if (got_bmu[i] != bmu[i]) begin
          failures++;
          if (failures < 10) $display("iteration %0d input %0d: BMU %0d expected %0d", it, i, got_bmu[i], bmu[i]);
        end
      end
      foreach (map[i]) begin
        checks++;
        if (!f32_same(bank1.mem[MAP_BASE + i], map[i])) begin
          failures++;
          if (failures < 10) $display("iteration %0d map[%0d] %h expected %h", it, i, bank1.mem[MAP_BASE+i], map[i]);
        end
      end
      // ---- NeigRed
      @(negedge clk); neig_start = 1;
      @(negedge clk); neig_start = 0;
      wait (neig_done);
      @(negedge clk);
      neig_runs++;
      ref_neigred(nr);
      foreach (nr[i]) begin
        checks++;
        if (bank1.mem[NR_BASE + i] != nr[i]) begin
          failures++;
          $display("iteration %0d NR[%0d] %h expected %h", it, i, bank1.mem[NR_BASE+i], nr[i]);
        end
      end
    end
    checks++;
    if (gap_bad != 0) begin failures++; $display("%0d inputs off the 2T+7 schedule", gap_bad); end
    expect_mech("bank-1 back-pressure", stalls1);
    expect_mech("bank-2 back-pressure", stalls2);
    expect_mech("bank-1 owner change", switches);
    expect_mech("BMU tie to lower index", ties);
    expect_mech("BMU away from neuron 0", nonzero_bmu);
    expect_mech("zero NR coefficient", frozen);
    expect_mech("NeigRed shift", neig_runs);
    expect_mech("input at 2T+7 cycles", gap_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
