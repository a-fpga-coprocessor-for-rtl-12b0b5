// dot_vectors_unit: the GAPPCO processing element.
//
// A Dot Vectors unit computes sums of products, the operation a compiled
// geometric algebra program reduces to. It takes eight single precision
// operands, forms the four products p0 = op0*op1, p1 = op2*op3,
// p2 = op4*op5, p3 = op6*op7 and, as its mode register says, gives either
// two sums of two products (out0 = p0+p1, out1 = p2+p3) or one sum of four
// products (out0 = p0+p1+p2+p3; out1 still carries p2+p3). Both modes and
// the pipelined structure follow the description of the unit; the split
// into three register stages is this design's choice:
//   stage 1: four multipliers      -> p0..p3
//   stage 2: two adders            -> p0+p1, p2+p3
//   stage 3: one adder (1x4 mode)  -> out0, out1
// A new operand set can enter every cycle; results appear DV_LATENCY (3)
// cycles after in_valid, with out_valid.
// The mode is a configuration register, loaded from bit CFG_MODE_BIT of
// configuration word 0 when cfg_we is high and cfg_word is 0.
module dot_vectors_unit
  import gappco_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_we,
  input  logic                          cfg_word,
  input  logic [31:0]                   cfg_data,
  output dv_mode_e                      mode,
  // operands
  input  logic                          in_valid,
  input  logic [DV_OPS-1:0][DATA_W-1:0] op,
  // results
  output logic                          out_valid,
  output logic [DATA_W-1:0]             out0,
  output logic [DATA_W-1:0]             out1
);
  logic [3:0][DATA_W-1:0] prod_c, prod_q;
  logic [DATA_W-1:0]      pair0_c, pair1_c, pair0_q, pair1_q, quad_c;
  logic                   v1_q, v2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      mode <= DV_MODE_2X2;
    else if (cfg_we && !cfg_word)    mode <= dv_mode_e'(cfg_data[CFG_MODE_BIT]);
  end

  for (genvar k = 0; k < 4; k++) begin : g_mul
    fp32_mul u_mul (.a(op[2*k]), .b(op[2*k+1]), .y(prod_c[k]));
  end
  fp32_add u_add_p0 (.a(prod_q[0]), .b(prod_q[1]), .y(pair0_c));
  fp32_add u_add_p1 (.a(prod_q[2]), .b(prod_q[3]), .y(pair1_c));
  fp32_add u_add_q  (.a(pair0_q),   .b(pair1_q),   .y(quad_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      v2_q      <= 1'b0;
      out_valid <= 1'b0;
      prod_q    <= '0;
      pair0_q   <= '0;
      pair1_q   <= '0;
      out0      <= '0;
      out1      <= '0;
    end else begin
      v1_q      <= in_valid;
      v2_q      <= v1_q;
      out_valid <= v2_q;
      if (in_valid) prod_q <= prod_c;
      if (v1_q) begin
        pair0_q <= pair0_c;
        pair1_q <= pair1_c;
      end
      if (v2_q) begin
        out0 <= (mode == DV_MODE_1X4) ? quad_c : pair0_q;
        out1 <= pair1_q;
      end
    end
  end
endmodule
