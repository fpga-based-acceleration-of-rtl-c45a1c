// tb_neigred_kernel: self-checking test of the NeigRed kernel.
//
// A 16-entry NR vector sits in a memory model with random back-pressure.
// The kernel is run five times; after each run the vector in memory must
// equal the previous one moved down by one entry with a zero appended,
// the words around it must be untouched, and busy/done must behave. The
// run time is checked against its lower bound of 2*16+3 cycles.
module tb_neigred_kernel;
  import som_pkg::*;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  localparam int S = 16;
  localparam int BASE = 40;
  logic clk = 0, rst = 1;
  logic start, busy, done;
  gaddr_t nr_base;
  gmem_req_t m_req;
  gmem_rsp_t m_rsp;
  int stalls;
  int checks = 0, failures = 0;

  neigred_kernel #(.MAP_SIDE(S)) dut (
    .clk(clk), .rst(rst), .start(start), .nr_base(nr_base), .busy(busy), .done(done),
    .m_req(m_req), .m_rsp(m_rsp));
  gmem_model #(.DEPTH(128), .LATENCY(3), .STALL_PCT(25)) mem (
    .clk(clk), .rst(rst), .req_i(m_req), .rsp_o(m_rsp), .stalls(stalls));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_t nr[];
    int cycles;
    nr = new[S];
    start = 0; nr_base = BASE;
    for (int i = 0; i < 128; i++) mem.mem[i] = 32'hdead0000 + i;
    for (int i = 0; i < S; i++) begin
      nr[i] = real_to_f32(0.5 * $exp(-real'(i*i) / 32.0));
      mem.mem[BASE + i] = nr[i];
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) begin failures++; $display("busy not raised"); end
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      ref_neigred(nr);
      @(negedge clk);
      checks++;
      if (busy || cycles < 2*S + 3) begin
        failures++;
        $display("timing: busy=%0d cycles=%0d", busy, cycles);
      end
      for (int i = 0; i < S; i++) begin
        checks++;
        if (mem.mem[BASE + i] != nr[i]) begin
          failures++;
          if (failures < 10) $display("MISMATCH run %0d NR[%0d] %h expected %h", run, i, mem.mem[BASE+i], nr[i]);
        end
      end
      checks++;
      if (mem.mem[BASE-1] != 32'hdead0000 + BASE - 1 || mem.mem[BASE+S] != 32'hdead0000 + BASE + S) begin
        failures++;
        $display("neighbouring words overwritten");
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
