// fp32_add: combinational IEEE-754 single precision adder.
//
// The second arithmetic element of the Dot Vectors units. The operand with
// the larger magnitude is taken as the reference; the other significand is
// aligned to it with guard, round and sticky bits, added or subtracted, the
// sum is normalised (one place right, or left by the leading-zero count) and
// rounded to nearest, ties to even.
// Design choices, as in fp32_mul: subnormals read as zero and results below
// the normal range flush to zero; overflow gives infinity; a NaN input or
// the sum of opposite infinities gives the quiet NaN 0x7FC00000; an exact
// zero sum is +0 unless both operands are -0.
// Interface: a, b in, y out, no clock.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sx, sn;
  logic [7:0]  ea, eb, ex, en;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [23:0] mx, mn;
  logic [7:0]  diff;
  logic [26:0] ax, an;      // significand, guard, round, sticky
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic signed [9:0] exp_y;
  logic [23:0] mant;
  logic        guard, rs, inc;
  logic [24:0] mant_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    // order by magnitude: x is the larger operand
    if ({ea, fa} >= {eb, fb}) begin
      sx = sa; ex = ea; mx = {1'b1, fa};
      sn = sb; en = eb; mn = {1'b1, fb};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, fb};
      sn = sa; en = ea; mn = {1'b1, fa};
    end

    // align the smaller significand, folding shifted-out bits into sticky
    diff = ex - en;
    ax   = {mx, 3'b000};
    an   = {mn, 3'b000};
    if (diff >= 8'd27)
      an = 27'd1;
    else if (diff != 8'd0)
      an = (an >> diff) | {26'd0, |(an & ((27'd1 << diff) - 27'd1))};

    if (sx ^ sn) sum = {1'b0, ax} - {1'b0, an};
    else         sum = {1'b0, ax} + {1'b0, an};

    // normalise
    exp_y = $signed({2'b00, ex});
    lz    = 5'd0;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found && sum[i]) found = 1'b1;
      else if (!found) lz = lz + 5'd1;
    end
    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_y = exp_y + 10'sd1;
    end else begin
      sum   = sum << lz;
      exp_y = exp_y - $signed({5'd0, lz});
    end

    mant   = sum[26:3];
    guard  = sum[2];
    rs     = sum[1] | sum[0];
    inc    = guard & (rs | mant[0]);
    mant_r = {1'b0, mant} + {24'd0, inc};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = QNAN;
    else if (a_inf)
      y = a;
    else if (b_inf)
      y = b;
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum == '0)
      y = 32'd0;
    else if (exp_y >= 10'sd255)
      y = {sx, 8'hFF, 23'd0};
    else if (exp_y <= 10'sd0)
      y = {sx, 31'd0};
    else
      y = {sx, exp_y[7:0], mant_r[22:0]};
  end
endmodule
