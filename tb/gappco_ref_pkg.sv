// gappco_ref_pkg: reference model of a GAPPCO run for the testbenches.
//
// A program is one (mode, 8 selects) entry per unit. The model evaluates
// row 1 from the input words and row 2 from the input and intermediate
// words in the same operation order as the hardware ((p0+p1)+(p2+p3)),
// using the reference arithmetic of fp_ref_pkg, so results must match bit
// for bit. Also: the configuration stream of a program, random programs,
// and the program for the reflection of a 5D conformal vector.
package gappco_ref_pkg;
  import gappco_pkg::*;
  import fp_ref_pkg::*;

  typedef struct {
    dv_mode_e         mode;
    logic [SEL_W-1:0] sel [DV_OPS];
  } unit_prog_t;

  typedef unit_prog_t  prog_t   [N_UNITS];
  typedef logic [31:0] in_t     [IN_REGS];
  typedef logic [31:0] mid_t    [MID_REGS];
  typedef logic [31:0] out_t    [OUT_REGS];
  typedef logic [31:0] stream_t [CFG_WORDS];

  function automatic stream_t encode(input prog_t p);
    stream_t s;
    for (int u = 0; u < N_UNITS; u++) begin
      s[2*u]   = {1'(p[u].mode), 7'd0, p[u].sel[3], p[u].sel[2], p[u].sel[1], p[u].sel[0]};
      s[2*u+1] = {8'd0, p[u].sel[7], p[u].sel[6], p[u].sel[5], p[u].sel[4]};
    end
    return s;
  endfunction

  // one Dot Vectors unit
  function automatic void dv(input dv_mode_e m, input logic [31:0] op [DV_OPS],
                             output logic [31:0] o0, output logic [31:0] o1);
    logic [31:0] s0, s1;
    s0 = ref_add(ref_mul(op[0], op[1]), ref_mul(op[2], op[3]));
    s1 = ref_add(ref_mul(op[4], op[5]), ref_mul(op[6], op[7]));
    o0 = (m == DV_MODE_1X4) ? ref_add(s0, s1) : s0;
    o1 = s1;
  endfunction

  function automatic void run(input prog_t p, input in_t in, output mid_t mid,
                              output out_t out);
    logic [31:0] op [DV_OPS];
    int unsigned sv;
    for (int s = 0; s < N_STAGES; s++) begin
      for (int l = 0; l < N_LANES; l++) begin
        int u = s * N_LANES + l;
        for (int k = 0; k < DV_OPS; k++) begin
          sv = p[u].sel[k];
          if (sv < IN_REGS)                      op[k] = in[sv];
          else if (s > 0 && sv < IN_REGS + MID_REGS) op[k] = mid[sv - IN_REGS];
          else                                   op[k] = 32'h0;
        end
        if (s == 0) dv(p[u].mode, op, mid[2*l], mid[2*l+1]);
        else        dv(p[u].mode, op, out[2*l], out[2*l+1]);
      end
    end
  endfunction

  function automatic prog_t random_prog();
    prog_t p;
    for (int u = 0; u < N_UNITS; u++) begin
      int ns = (u < N_LANES) ? IN_REGS : IN_REGS + MID_REGS;
      p[u].mode = dv_mode_e'($urandom_range(0, 1));
      for (int k = 0; k < DV_OPS; k++)
        p[u].sel[k] = ($urandom_range(0, 7) == 0) ? SEL_ZERO : SEL_W'($urandom_range(0, ns - 1));
    end
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Reflection of a conformal vector x in a vector a (basis e1, e2, e3,
  // e+, e- with e-^2 = -1): x' = -a x a = (a.a) x - 2 (a.x) a.
  // Input words: 0..4 a, 5..9 x, 10 -a5 (the e- coefficient of a with the
  // metric sign applied), 11 the constant -2.0.
  // Row 1: lane 0 (1x4) A4 = a1x1+..+a4x4        -> mid 0
  //        lane 1 (2x2) -a5*x5, -a5*a5            -> mid 2, 3
  //        lane 2 (1x4) N4 = a1a1+..+a4a4         -> mid 4
  //        lanes 3..5 (2x2) b_i = -2 a_i          -> mid 6..10
  // so a.x = mid0 + mid2 and a.a = mid4 + mid3.
  // Row 2: lane i (1x4) x'_i = mid4*x_i + mid3*x_i + mid0*b_i + mid2*b_i
  //                                               -> out 2i
  // ---------------------------------------------------------------------
  localparam logic [SEL_W-1:0] Z = SEL_ZERO;
  localparam logic [31:0] MINUS_TWO = 32'hC000_0000;

  function automatic prog_t reflect_prog();
    prog_t p;
    for (int u = 0; u < N_UNITS; u++) begin
      p[u].mode = DV_MODE_2X2;
      for (int k = 0; k < DV_OPS; k++) p[u].sel[k] = Z;
    end
    p[0].mode = DV_MODE_1X4;
    p[0].sel  = '{0, 5, 1, 6, 2, 7, 3, 8};
    p[1].sel  = '{10, 9, Z, Z, 10, 4, Z, Z};
    p[2].mode = DV_MODE_1X4;
    p[2].sel  = '{0, 0, 1, 1, 2, 2, 3, 3};
    p[3].sel  = '{0, 11, Z, Z, 1, 11, Z, Z};
    p[4].sel  = '{2, 11, Z, Z, 3, 11, Z, Z};
    p[5].sel  = '{4, 11, Z, Z, Z, Z, Z, Z};
    for (int i = 0; i < 5; i++) begin
      p[N_LANES + i].mode = DV_MODE_1X4;
      p[N_LANES + i].sel  = '{IN_REGS + 4, 5 + i, IN_REGS + 3, 5 + i,
                             IN_REGS + 0, IN_REGS + 6 + i, IN_REGS + 2, IN_REGS + 6 + i};
    end
    return p;
  endfunction

  function automatic in_t reflect_inputs(input real a [5], input real x [5]);
    in_t in;
    for (int k = 0; k < IN_REGS; k++) in[k] = 32'h0;
    for (int k = 0; k < 5; k++) begin
      in[k]     = r2f(a[k]);
      in[5 + k] = r2f(x[k]);
    end
    in[10] = r2f(-a[4]);
    in[11] = MINUS_TWO;
    return in;
  endfunction

  // closed form in double precision, for a tolerance check
  function automatic void reflect_exact(input real a [5], input real x [5], output real y [5]);
    real ax, aa;
    ax = a[0]*x[0] + a[1]*x[1] + a[2]*x[2] + a[3]*x[3] - a[4]*x[4];
    aa = a[0]*a[0] + a[1]*a[1] + a[2]*a[2] + a[3]*a[3] - a[4]*a[4];
    for (int i = 0; i < 5; i++) y[i] = aa * x[i] - 2.0 * ax * a[i];
  endfunction

endpackage
