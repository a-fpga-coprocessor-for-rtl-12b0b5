// routing_matrix: programmable operand crossbar in front of one Dot Vectors
// unit.
//
// It connects register file words to the eight operand inputs of its unit.
// Each operand has a SEL_W-bit select register; a select below N_SRC picks
// that source word, any other value gives +0.0, so that unused products
// vanish from a sum. In the first row the sources are the input register
// file; in the second row they are the input file followed by the
// intermediate file, which is how one unit's results reach another unit.
// The routing role and the two source sets follow the block diagram; the
// select encoding, the zero source and the capture register are this
// design's choices.
// Configuration: word 0 loads selects 0..3, word 1 selects 4..7, select k
// of a word at bits [6k+5:6k], when cfg_we is high.
// Timing: when load is high the selected words are captured; they appear
// on op with out_valid the next cycle (RM_LATENCY = 1).
module routing_matrix
  import gappco_pkg::*;
#(
  parameter int unsigned N_SRC = IN_REGS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_we,
  input  logic                          cfg_word,
  input  logic [31:0]                   cfg_data,
  output logic [DV_OPS-1:0][SEL_W-1:0]  sel,
  // data
  input  logic [N_SRC-1:0][DATA_W-1:0]  src,
  input  logic                          load,
  output logic                          out_valid,
  output logic [DV_OPS-1:0][DATA_W-1:0] op
);
  localparam int unsigned HALF = DV_OPS / 2;

  initial assert (N_SRC <= 2**SEL_W - 1)
    else $error("routing_matrix: N_SRC %0d needs wider selects", N_SRC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= {DV_OPS{SEL_ZERO}};
    end else if (cfg_we) begin
      for (int k = 0; k < HALF; k++)
        sel[HALF*int'(cfg_word) + k] <= cfg_data[SEL_W*k +: SEL_W];
    end
  end

  logic [DV_OPS-1:0][DATA_W-1:0] op_c;
  always_comb begin
    for (int k = 0; k < DV_OPS; k++)
      op_c[k] = (32'(sel[k]) < N_SRC) ? src[sel[k]] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      op        <= '0;
    end else begin
      out_valid <= load;
      if (load) op <= op_c;
    end
  end
endmodule
