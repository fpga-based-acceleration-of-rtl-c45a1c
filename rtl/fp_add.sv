// fp_add: IEEE-754 binary32 adder / subtractor, combinational.
//
// y = a + b, or a - b when sub is high. Both operands are unpacked, the
// smaller one is aligned to the larger with 26 extra low bits plus a sticky
// bit, the mantissas are added or subtracted exactly, the result is
// renormalised with a leading-zero count and rounded to nearest, ties to
// even. Simplifications chosen for this accelerator (the data are ordinary
// values, 0..10000 and coefficients below 1): subnormal inputs are read as
// zero and subnormal results are flushed to +0; an overflow gives infinity;
// NaN and infinity inputs are not treated specially. An exact zero sum is
// +0. The accelerator only needs binary32 arithmetic; the way it is built
// here is this design's own.
module fp_add
  import som_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  input  logic sub,
  output f32_t y
);

  localparam int XW = 24 + 26;  // aligned mantissa width

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, ms;
  logic [7:0]  d;
  logic [XW-1:0] xl, xs;
  logic        sticky;
  logic [XW:0] sum;
  int          lz;
  logic [XW:0] norm;
  int          e_res;
  logic [23:0] mant;
  logic        guard, rest, rnd;
  logic [24:0] mant_r;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    // larger magnitude first
    if ({ea, ma} >= {eb, mb}) begin
      sl = sa; el = ea; ml = ma; ss = sb; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; ss = sa; es = ea; ms = ma;
    end
    if (ms == 24'd0) es = el;  // zero operand needs no alignment
    d = el - es;

    xl = {ml, 26'd0};
    xs = {ms, 26'd0};
    sticky = 1'b0;
    if (d >= 8'(XW)) begin
      sticky = (ms != 24'd0);
      xs = '0;
    end else begin
      for (int i = 0; i < XW; i++)
        if (i < int'(d) && xs[i]) sticky = 1'b1;
      xs = xs >> d;
    end

    if (sl == ss) sum = {1'b0, xl} + {1'b0, xs};
    else          sum = {1'b0, xl} - {1'b0, xs} - {{XW{1'b0}}, sticky};
    // For a subtraction the sticky bit is borrowed once above, which keeps
    // the truncated result below the exact one, and is kept as sticky.

    lz = 0;
    for (int i = XW; i >= 0; i--)
      if (sum[i]) begin
        lz = XW - i;
        break;
      end
    norm  = sum << lz;  // leading one now at bit XW
    e_res = int'(el) + 1 - lz;

    mant  = norm[XW:XW-23];
    guard = norm[XW-24];
    rest  = (norm[XW-25:0] != '0) || sticky;
    rnd   = guard && (rest || mant[0]);
    mant_r = {1'b0, mant} + 25'(rnd);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 1;
    end

    if (sum == '0)                    y = F32_ZERO;
    else if (e_res <= 0)              y = F32_ZERO;
    else if (e_res >= 255)            y = {sl, 8'hff, 23'd0};
    else                              y = {sl, 8'(e_res), mant_r[22:0]};
  end

endmodule
