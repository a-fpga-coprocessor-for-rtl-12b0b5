// fp32_mul: combinational IEEE-754 single precision multiplier.
//
// The Dot Vectors units build their sums of products from 32-bit floating
// point multipliers and adders. This one multiplies the two 24-bit
// significands (hidden one included) into a 48-bit product, normalises it
// by at most one place, and rounds to nearest, ties to even.
// Design choices: subnormal inputs are read as zero and results below the
// normal range are flushed to a signed zero; overflow gives infinity; a NaN
// input or infinity times zero gives the quiet NaN 0x7FC00000.
// Interface: a, b in, y out, no clock; the caller registers the result.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, inc;
  logic [24:0] mant_r;
  logic signed [10:0] exp_y;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_y = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_y  = exp_y + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {24'd0, inc};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_y  = exp_y + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = QNAN;
    else if (a_inf || b_inf)
      y = {sy, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (exp_y >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (exp_y <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, exp_y[7:0], mant_r[22:0]};
  end
endmodule
