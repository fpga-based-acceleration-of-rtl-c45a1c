// fp_mul: IEEE-754 binary32 multiplier, combinational.
//
// y = a * b. The 24x24-bit mantissa product is normalised by at most one
// place, then rounded to nearest, ties to even. As in fp_add, subnormal
// inputs count as zero and subnormal results are flushed to a signed zero;
// overflow gives infinity and NaN/infinity inputs are not treated
// specially. Only the use of binary32 comes from the accelerator's float
// data; the construction is this design's own.
module fp_mul
  import som_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  int          e_res;
  logic [23:0] mant;
  logic        guard, rest, rnd;
  logic [24:0] mant_r;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e_res = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      mant  = p[47:24];
      guard = p[23];
      rest  = (p[22:0] != '0);
      e_res = e_res + 1;
    end else begin
      mant  = p[46:23];
      guard = p[22];
      rest  = (p[21:0] != '0);
    end
    rnd    = guard && (rest || mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 1;
    end

    if (ea == 8'd0 || eb == 8'd0) y = {s, 31'd0};
    else if (e_res <= 0)          y = {s, 31'd0};
    else if (e_res >= 255)        y = {s, 8'hff, 23'd0};
    else                          y = {s, 8'(e_res), mant_r[22:0]};
  end

endmodule
