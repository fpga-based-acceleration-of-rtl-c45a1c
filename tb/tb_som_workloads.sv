// tb_som_workloads: the evaluated configurations other than the default.
//
// One training iteration (a full SOMComp pass over 5120 inputs, then
// NeigRed) on each of the other map sizes, 8x8, 12x12, 20x20 and 24x24 at
// dimension 3, and on the 16x16 map at dimensions 4, 5 and 6. Input
// sizes 1024 to 4096 differ from these only in how many inputs are
// processed, so a 12x12 run with 2048 inputs stands for them. Each
// configuration is a separately built som_accel_top in som_workload_run,
// checked bit for bit against the reference model. The runs proceed side
// by side; the SOMComp cycle count of each is printed.
module tb_som_workloads;
  logic clk = 0;
  logic go = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  logic fin [NCFG];
  int   chk [NCFG], fl [NCFG], cyc [NCFG];
  string name [NCFG] = '{"8x8 N5120 D3", "12x12 N5120 D3", "20x20 N5120 D3", "24x24 N5120 D3",
                         "16x16 N5120 D4", "16x16 N5120 D5", "16x16 N5120 D6", "12x12 N2048 D3"};

  som_workload_run #(.S(8),  .N(5120), .D(3)) r0 (.clk(clk), .go(go), .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .pass_cycles(cyc[0]));
  som_workload_run #(.S(12), .N(5120), .D(3)) r1 (.clk(clk), .go(go), .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .pass_cycles(cyc[1]));
  som_workload_run #(.S(20), .N(5120), .D(3)) r2 (.clk(clk), .go(go), .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .pass_cycles(cyc[2]));
  som_workload_run #(.S(24), .N(5120), .D(3)) r3 (.clk(clk), .go(go), .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .pass_cycles(cyc[3]));
  som_workload_run #(.S(16), .N(5120), .D(4)) r4 (.clk(clk), .go(go), .finished(fin[4]), .checks(chk[4]), .failures(fl[4]), .pass_cycles(cyc[4]));
  som_workload_run #(.S(16), .N(5120), .D(5)) r5 (.clk(clk), .go(go), .finished(fin[5]), .checks(chk[5]), .failures(fl[5]), .pass_cycles(cyc[5]));
  som_workload_run #(.S(16), .N(5120), .D(6)) r6 (.clk(clk), .go(go), .finished(fin[6]), .checks(chk[6]), .failures(fl[6]), .pass_cycles(cyc[6]));
  som_workload_run #(.S(12), .N(2048), .D(3)) r7 (.clk(clk), .go(go), .finished(fin[7]), .checks(chk[7]), .failures(fl[7]), .pass_cycles(cyc[7]));

  int checks = 0, failures = 0;

  initial begin
    repeat (8000000) @(posedge clk);
    for (int i = 0; i < NCFG; i++) if (!fin[i]) $display("%s did not finish", name[i]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (2) @(posedge clk);
    go = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (!fin[i]) all_done = 0;
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      $display("%-16s SOMComp %8d cycles, %6d checks, %0d failures", name[i], cyc[i], chk[i], fl[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
