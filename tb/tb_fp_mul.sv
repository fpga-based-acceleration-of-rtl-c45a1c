// tb_fp_mul: self-checking test of the binary32 multiplier.
//
// Random operands (with results kept in the normal range), zero operands,
// products that carry into a new binade and exact powers of two are
// compared with the double-precision reference of fp_ref_pkg.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check_one(logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp_y;
    a = ta; b = tb_;
    #1;
    exp_y = ref_mul(ta, tb_);
    checks++;
    if (!f32_same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h3f800000, 32'h40490fdb);  // 1 * pi
    check_one(32'h40000000, 32'h40400000);  // 2 * 3
    check_one(32'h00000000, 32'h461c4000);  // 0 * 10000
    check_one(32'h3fffffff, 32'h3fffffff);  // carries into next binade
    check_one(32'hbf000000, 32'h461c4000);  // -0.5 * 10000
    for (int i = 0; i < 40000; i++)
      check_one(rand_f32(70, 180, 1), rand_f32(70, 180, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
