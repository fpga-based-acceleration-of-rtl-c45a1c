// tb_bmu_search: self-checking test of the BMU search.
//
// Streams of 64 random non-negative distances (with deliberate ties and
// with the minimum at the first, last and random positions, and idle
// cycles between elements) are fed in; after each stream the winner index
// and distance are compared with a reference that keeps the first
// smallest value.
module tb_bmu_search;
  import fp_ref_pkg::*;

  localparam int NEURONS = 64;
  logic clk = 0, rst = 1;
  logic valid, first;
  logic [31:0] cand_dist, best_dist;
  logic [5:0] idx, best_idx;
  int checks = 0, failures = 0;

  bmu_search #(.NEURONS(NEURONS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d [NEURONS];
    int ew; logic [31:0] ed;
    valid = 0; first = 0; cand_dist = 0; idx = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 300; s++) begin
      for (int j = 0; j < NEURONS; j++)
        d[j] = real_to_f32(real'($urandom_range(500, 40000)) / 4.0);
      case (s % 4)
        0: d[0] = 32'h00000000;                        // minimum at neuron 0
        1: d[NEURONS-1] = real_to_f32(1.0);            // minimum at the end
        2: begin                                       // tie: two equal minima
          int a = $urandom_range(1, NEURONS-2);
          d[a] = real_to_f32(3.0);
          d[a + 1 + $urandom_range(0, NEURONS-2-a)] = real_to_f32(3.0);
        end
        default: ;
      endcase
      ew = 0; ed = d[0];
      for (int j = 1; j < NEURONS; j++) if (f2r(d[j]) < f2r(ed)) begin ew = j; ed = d[j]; end
      for (int j = 0; j < NEURONS; j++) begin
        @(negedge clk);
        valid = 1; first = (j == 0); cand_dist = d[j]; idx = 6'(j);
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          valid = 0; cand_dist = 32'h0; // idle cycle with a small value on the bus
        end
      end
      @(negedge clk);
      valid = 0;
      @(negedge clk);
      checks++;
      if (best_idx != 6'(ew) || best_dist != ed) begin
        failures++;
        if (failures < 10) $display("MISMATCH stream %0d: %0d/%h expected %0d/%h", s, best_idx, best_dist, ew, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
