// tb_gmem_mux: self-checking test of the bank-1 port mux.
//
// Two random masters issue reads and writes to a memory model with
// latency and back-pressure. Each master tracks its own outstanding reads
// and checks that every response it receives carries the data of its own
// oldest read; writes from both are checked at the end. Ownership changes
// are counted and must occur; a request from the non-owner must never be
// granted.
module tb_gmem_mux;
  import som_pkg::*;

  logic clk = 0, rst = 1;
  gmem_req_t m_req [2];
  gmem_rsp_t m_rsp [2];
  gmem_req_t s_req;
  gmem_rsp_t s_rsp;
  logic owner, switched;
  int stalls;
  int checks = 0, failures = 0, switches = 0;

  gmem_mux #(.MAX_OUTSTANDING(8)) dut (
    .clk(clk), .rst(rst), .m0_req(m_req[0]), .m0_rsp(m_rsp[0]),
    .m1_req(m_req[1]), .m1_rsp(m_rsp[1]), .s_req(s_req), .s_rsp(s_rsp),
    .owner(owner), .switched(switched));
  gmem_model #(.DEPTH(256), .LATENCY(5), .STALL_PCT(20)) mem (
    .clk(clk), .rst(rst), .req_i(s_req), .rsp_o(s_rsp), .stalls(stalls));

  always #5 clk = ~clk;

  // Memory regions: master 0 uses 0..127, master 1 uses 128..255, each
  // word initialised to its address; writes store random data.
  logic [31:0] expq [2][$];
  logic [31:0] wrote [256];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar m = 0; m < 2; m++) begin : g_master
    int burst;
    always_ff @(posedge clk) begin
      if (rst) begin
        m_req[m] <= '0;
        burst <= 0;
      end else begin
        if (m_req[m].req && m_rsp[m].gnt) begin
          if (!m_req[m].we) expq[m].push_back(mem_value(m_req[m].addr));
          else wrote[m_req[m].addr[7:0]] = m_req[m].wdata;
        end
        if (m_rsp[m].rvalid) begin
          checks++;
          if (expq[m].size() == 0 || m_rsp[m].rdata != expq[m][0]) begin
            failures++;
            $display("master %0d: wrong response %h", m, m_rsp[m].rdata);
          end
          if (expq[m].size() != 0) void'(expq[m].pop_front());
        end
        if (!m_req[m].req || m_rsp[m].gnt) begin
          // bursts of activity separated by idle gaps so the owner changes
          if (burst > 0) begin
            burst <= burst - 1;
            m_req[m].req   <= 1'b1;
            m_req[m].we    <= ($urandom_range(0, 3) == 0);
            m_req[m].addr  <= gaddr_t'(m * 128 + $urandom_range(0, 63));
            m_req[m].wdata <= $urandom;
          end else begin
            m_req[m].req <= 1'b0;
            if ($urandom_range(0, 30) == 0) burst <= $urandom_range(1, 12);
          end
        end
      end
    end
  end

  function automatic logic [31:0] mem_value(logic [31:0] a);
    return wrote[a[7:0]];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (switched) switches++;
      if (m_rsp[0].gnt && owner) begin failures++; $display("non-owner 0 granted"); end
      if (m_rsp[1].gnt && !owner) begin failures++; $display("non-owner 1 granted"); end
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      mem.mem[i] = i;
      wrote[i] = i;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20000) @(posedge clk);
    checks++;
    if (switches < 5) begin failures++; $display("too few ownership changes: %0d", switches); end
    $display("switches=%0d stalls=%0d", switches, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
