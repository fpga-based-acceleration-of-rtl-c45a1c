// tb_fp_add: self-checking test of the binary32 adder/subtractor.
//
// Random operands over a wide exponent range, near-cancelling pairs, equal
// exponents, zero operands and halfway rounding cases are applied with both
// values of sub; every result is compared with the double-precision
// reference of fp_ref_pkg (rounded back to binary32).
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check_one(logic [31:0] ta, logic [31:0] tb_, logic ts);
    logic [31:0] exp_y;
    a = ta; b = tb_; sub = ts;
    #1;
    exp_y = ts ? ref_sub(ta, tb_) : ref_add(ta, tb_);
    checks++;
    if (!f32_same(y, exp_y)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, y, exp_y);
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
    logic [31:0] x, z;
    // directed cases
    check_one(32'h3f800000, 32'h3f800000, 1'b0);  // 1 + 1
    check_one(32'h3f800000, 32'h3f800000, 1'b1);  // 1 - 1
    check_one(32'h00000000, 32'h40490fdb, 1'b0);  // 0 + pi
    check_one(32'h40490fdb, 32'h00000000, 1'b1);  // pi - 0
    check_one(32'h3f800000, 32'h33800000, 1'b0);  // 1 + 2^-24 (tie, even)
    check_one(32'h3f800001, 32'h33800000, 1'b0);  // tie, round up to even
    check_one(32'h3f800000, 32'h33800000, 1'b1);  // 1 - 2^-24
    check_one(32'h4b800000, 32'h3f800000, 1'b1);  // 2^24 - 1
    check_one(32'h461c4000, 32'h461c3fff, 1'b1);  // 10000 - nearly 10000
    // random, wide range
    for (int i = 0; i < 20000; i++)
      check_one(rand_f32(40, 200, 1), rand_f32(40, 200, 1), 1'($urandom));
    // random, close exponents (cancellation and carry)
    for (int i = 0; i < 20000; i++) begin
      x = rand_f32(100, 150, 1);
      z = x;
      z[30:23] = 8'(int'(x[30:23]) + int'($urandom_range(0, 2)) - 1);
      z[7:0] = 8'($urandom);
      z[31] = 1'($urandom);
      check_one(x, z, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
