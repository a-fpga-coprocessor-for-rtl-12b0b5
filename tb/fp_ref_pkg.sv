// fp_ref_pkg: reference single precision arithmetic for the testbenches.
//
// Single precision values are widened to the simulator's double precision
// reals, combined there, and narrowed back with round to nearest, ties to
// even. A product of two singles is exact in double precision, and a
// double-rounded sum of two singles equals the correctly rounded one, so
// the results are those of IEEE single precision arithmetic. The same
// conventions as the hardware are applied: subnormals read as zero, results
// below the normal range flush to a signed zero, NaN is 0x7FC00000.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0)
      d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF)
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else
      d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    logic [10:0] e11;
    logic [51:0] m52;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    {s, e11, m52} = d;
    if (e11 == 11'h7FF) return (m52 != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (e11 == 11'd0)   return {s, 31'd0};
    e  = int'(e11) - 1023 + 127;
    m  = {2'b01, m52[51:29]};
    g  = m52[28];
    st = |m52[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // random normal number with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_f(input int elo, input int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(0, ehi - elo)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
