// tb_somcomp_kernel: self-checking test of the SOMComp kernel.
//
// A 4x4 map, 16 inputs of 3 dimensions, random values in 0..10000, and a
// Gaussian-shaped NR vector, held in two memory models with latency and
// random back-pressure. The kernel is run twice (the second pass starts
// from the map the first one wrote back). After each run the BMU reported
// for every input and the map in memory are compared with the reference
// pass of som_ref_pkg, and the NR vector and the input set must be
// unchanged. Neuron 5 starts as a copy of neuron 2 and input 0 equals it,
// so the first BMU is a tie that must go to neuron 2. Every input must
// take exactly 2*T+7 cycles between BMU reports (T = 16 neurons).
module tb_somcomp_kernel;
  import som_pkg::*;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  localparam int S = 4, N = 16, D = 3, T = S * S;
  localparam int MAP_BASE = 0, NR_BASE = 100, IN_BASE = 8;

  logic clk = 0, rst = 1;
  logic start, busy, done, bmu_valid;
  logic [3:0] bmu_idx;
  f32_t bmu_dist;
  gmem_req_t m1_req, m2_req;
  gmem_rsp_t m1_rsp, m2_rsp;
  int stalls1, stalls2;
  int checks = 0, failures = 0;

  somcomp_kernel #(.MAP_SIDE(S), .INPUT_SIZE(N), .DIM(D)) dut (
    .clk(clk), .rst(rst), .start(start),
    .map_base(MAP_BASE), .input_base(IN_BASE), .nr_base(NR_BASE),
    .busy(busy), .done(done), .m1_req(m1_req), .m1_rsp(m1_rsp),
    .m2_req(m2_req), .m2_rsp(m2_rsp),
    .bmu_valid(bmu_valid), .bmu_idx(bmu_idx), .bmu_dist(bmu_dist));
  gmem_model #(.DEPTH(128), .LATENCY(4), .STALL_PCT(20)) bank1 (
    .clk(clk), .rst(rst), .req_i(m1_req), .rsp_o(m1_rsp), .stalls(stalls1));
  gmem_model #(.DEPTH(64), .LATENCY(2), .STALL_PCT(30)) bank2 (
    .clk(clk), .rst(rst), .req_i(m2_req), .rsp_o(m2_rsp), .stalls(stalls2));

  always #5 clk = ~clk;

  // BMU log of the running pass
  int got_bmu [$];
  int last_bmu_cycle, cycle;
  int gap_errors = 0;
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (bmu_valid && !rst) begin
      got_bmu.push_back(int'(bmu_idx));
      if (got_bmu.size() > 1 && cycle - last_bmu_cycle != 2*T + 7) gap_errors++;
      last_bmu_cycle <= cycle;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic f_t rnd_val();
    return real_to_f32(real'($urandom_range(0, 10000000)) / 1000.0);
  endfunction

  initial begin
    f_t map[], inp[], nr[];
    int bmu[];
    cycle = 0;
    map = new[T*D]; inp = new[N*D]; nr = new[S];
    foreach (map[i]) map[i] = rnd_val();
    for (int l = 0; l < D; l++) map[5*D + l] = map[2*D + l];
    foreach (inp[i]) inp[i] = rnd_val();
    for (int l = 0; l < D; l++) inp[l] = map[2*D + l];
    for (int i = 0; i < S; i++) nr[i] = real_to_f32(0.4 * $exp(-real'(i*i) / 2.0));
    for (int i = 0; i < 128; i++) bank1.mem[i] = 32'hbad0_0000 + i;
    foreach (map[i]) bank1.mem[MAP_BASE + i] = map[i];
    foreach (nr[i])  bank1.mem[NR_BASE + i] = nr[i];
    foreach (inp[i]) bank2.mem[IN_BASE + i] = inp[i];
    start = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      got_bmu = {};
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      wait (done);
      @(negedge clk);
      ref_pass(S, D, N, map, inp, nr, bmu);
      checks++;
      if (got_bmu.size() != N) begin
        failures++;
        $display("pass %0d: %0d BMU reports, expected %0d", pass, got_bmu.size(), N);
      end
      for (int i = 0; i < N && i < got_bmu.size(); i++) begin
        checks++;
        if (got_bmu[i] != bmu[i]) begin
          failures++;
          if (failures < 10) $display("pass %0d input %0d: BMU %0d expected %0d", pass, i, got_bmu[i], bmu[i]);
        end
      end
      if (pass == 0) begin
        checks++;
        if (got_bmu.size() == 0 || got_bmu[0] != 2) begin failures++; $display("tie not resolved to neuron 2"); end
      end
      foreach (map[i]) begin
        checks++;
        if (!f32_same(bank1.mem[MAP_BASE + i], map[i])) begin
          failures++;
          if (failures < 10) $display("pass %0d map[%0d] %h expected %h", pass, i, bank1.mem[MAP_BASE+i], map[i]);
        end
      end
      foreach (nr[i]) begin
        checks++;
        if (bank1.mem[NR_BASE + i] != nr[i]) begin failures++; $display("NR changed"); end
      end
      checks++;
      if (bank1.mem[MAP_BASE + T*D] != 32'hbad0_0000 + MAP_BASE + T*D) begin
        failures++; $display("write beyond the map");
      end
    end
    checks++;
    if (gap_errors != 0) begin failures++; $display("%0d inputs not at 2T+7 cycles", gap_errors); end
    checks++;
    if (stalls1 == 0 || stalls2 == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
