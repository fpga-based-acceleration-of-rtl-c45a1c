// tb_local_ram: self-checking test of the lane-writable local memory.
//
// Writes whole words and single lanes at random, reads random addresses
// and compares the registered read data (one cycle after the address) with
// a shadow array, including read-during-write of the same word (old data).
module tb_local_ram;
  localparam int DEPTH = 64, LANES = 3;
  logic clk = 0;
  logic we_valid;
  logic [LANES-1:0] we_lane;
  logic [5:0] waddr, raddr;
  logic [LANES-1:0][31:0] wdata, rdata;
  logic [LANES-1:0][31:0] shadow [DEPTH];
  logic [LANES-1:0][31:0] expect_q;
  int checks = 0, failures = 0;

  local_ram #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_valid = 0; we_lane = '0; waddr = 0; raddr = 0; wdata = '0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we_valid = 1; we_lane = '1; waddr = 6'(a);
      for (int l = 0; l < LANES; l++) wdata[l] = $urandom;
      shadow[a] = wdata;
    end
    @(negedge clk);
    we_valid = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = 6'($urandom_range(0, DEPTH-1));
      we_valid = 1'($urandom);
      we_lane = LANES'($urandom);
      waddr = (i % 7 == 0) ? raddr : 6'($urandom_range(0, DEPTH-1));
      for (int l = 0; l < LANES; l++) wdata[l] = $urandom;
      expect_q = shadow[raddr];
      if (we_valid)
        for (int l = 0; l < LANES; l++) if (we_lane[l]) shadow[waddr][l] = wdata[l];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("MISMATCH addr %0d: %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
