// tb_manhattan_dist: self-checking test of the Manhattan distance unit.
//
// Three instances (DIM = 3, 4 and 6, the odd and even tree shapes) are fed
// random vectors with values in 0..10000, identical vectors (distance 0)
// and mixed-sign values; each result is compared with the balanced-tree
// reference of som_ref_pkg.
module tb_manhattan_dist;
  import fp_ref_pkg::*;
  import som_ref_pkg::*;

  logic [2:0][31:0] w3, x3;
  logic [3:0][31:0] w4, x4;
  logic [5:0][31:0] w6, x6;
  logic [31:0] d3, d4, d6;
  int checks = 0, failures = 0;

  manhattan_dist #(.DIM(3)) dut3 (.w(w3), .x(x3), .dist_out(d3));
  manhattan_dist #(.DIM(4)) dut4 (.w(w4), .x(x4), .dist_out(d4));
  manhattan_dist #(.DIM(6)) dut6 (.w(w6), .x(x6), .dist_out(d6));

  function automatic logic [31:0] rnd_val(bit neg);
    real r = real'($urandom_range(0, 10000000)) / 1000.0;
    if (neg && $urandom_range(0, 1) == 1) r = -r;
    return real_to_f32(r);
  endfunction

  task automatic check(logic [31:0] got, f_t w[], f_t x[]);
    logic [31:0] e;
    e = ref_dist(w, x);
    checks++;
    if (!f32_same(got, e)) begin
      failures++;
      if (failures < 10) $display("MISMATCH dim %0d: %h expected %h", w.size(), got, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_t w[], x[];
    for (int t = 0; t < 3000; t++) begin
      bit same = (t % 50 == 0);
      bit neg  = (t % 3 == 0);
      for (int l = 0; l < 6; l++) begin
        w6[l] = rnd_val(neg);
        x6[l] = same ? w6[l] : rnd_val(neg);
      end
      for (int l = 0; l < 4; l++) begin w4[l] = w6[l]; x4[l] = x6[l]; end
      for (int l = 0; l < 3; l++) begin w3[l] = w6[l]; x3[l] = x6[l]; end
      #1;
      w = new[3]; x = new[3];
      for (int l = 0; l < 3; l++) begin w[l] = w3[l]; x[l] = x3[l]; end
      check(d3, w, x);
      w = new[4]; x = new[4];
      for (int l = 0; l < 4; l++) begin w[l] = w4[l]; x[l] = x4[l]; end
      check(d4, w, x);
      w = new[6]; x = new[6];
      for (int l = 0; l < 6; l++) begin w[l] = w6[l]; x[l] = x6[l]; end
      check(d6, w, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
