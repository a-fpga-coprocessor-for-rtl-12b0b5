// gappco_core: the GAPPCO coprocessor (geometric algebra pipelined
// coprocessor), as drawn in its block diagram.
//
//   input register file --> row 1: 8 routing matrices -> 8 Dot Vectors units
//        |                          --> intermediate register file
//        +----------------> row 2: 8 routing matrices -> 8 Dot Vectors units
//                                   --> output register file
//
// The row-2 routing matrices see both the input file (the bypass bus of the
// diagram) and the intermediate file, so row-2 units can combine inputs
// with row-1 results; that is how several Dot Vectors units are chained into
// a larger unit, and independent chains run in parallel as separate units.
// The control unit loads the per-unit configuration from the host's stream
// and sequences a run: row 1 reads the input file, computes, and writes the
// intermediate file; row 2 then does the same into the output file.
// Unit u = stage*N_LANES + lane; row s, lane l writes its out0/out1 to words
// 2l and 2l+1 of the next file.
// Host side: one-word write/read of the input file, one-word read of the
// output file, configuration stream, start, status and the cycle count of
// the last run (10 cycles with the default latencies).
module gappco_core
  import gappco_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // input data from the host
  input  logic                        in_we,
  input  logic [$clog2(IN_REGS)-1:0]  in_addr,
  input  logic [DATA_W-1:0]           in_wdata,
  output logic [DATA_W-1:0]           in_rdata,
  // output results to the host
  input  logic [$clog2(OUT_REGS)-1:0] out_addr,
  output logic [DATA_W-1:0]           out_rdata,
  // control signals and configuration stream from the host
  input  logic                        cfg_clear,
  input  logic                        cfg_valid,
  input  logic [31:0]                 cfg_data,
  input  logic                        start,
  // control signals to the host
  output status_t                     status,
  output logic [31:0]                 run_cycles
);
  localparam int unsigned N_SRC2 = IN_REGS + MID_REGS;

  logic [IN_REGS-1:0][DATA_W-1:0]   in_words;
  logic [MID_REGS-1:0][DATA_W-1:0]  mid_words, mid_wdata;
  logic [OUT_REGS-1:0][DATA_W-1:0]  out_words, out_wdata;

  logic [N_UNITS-1:0]  unit_cfg_we;
  logic                cfg_word;
  logic [31:0]         cfg_bus;
  logic [N_STAGES-1:0] launch, stage_done, rf_we;

  logic [N_STAGES-1:0][N_LANES-1:0]                  rm_valid, dv_valid;
  logic [N_STAGES-1:0][N_LANES-1:0][DV_OPS-1:0][DATA_W-1:0] rm_op;
  logic [N_STAGES-1:0][N_LANES-1:0][DATA_W-1:0]      dv_out0, dv_out1;

  control_unit u_cu (
    .clk, .rst_n,
    .cfg_clear, .cfg_valid, .cfg_data,
    .unit_cfg_we, .cfg_word, .cfg_data_o(cfg_bus),
    .start, .launch, .stage_done, .rf_we,
    .status, .run_cycles
  );

  register_file #(.N_WORDS(IN_REGS), .DATA_W(DATA_W)) u_rf_in (
    .clk, .rst_n,
    .host_we(in_we), .host_addr(in_addr), .host_wdata(in_wdata),
    .host_rdata(in_rdata),
    .par_we(1'b0), .par_wdata('0),
    .rd_all(in_words)
  );

  register_file #(.N_WORDS(MID_REGS), .DATA_W(DATA_W)) u_rf_mid (
    .clk, .rst_n,
    .host_we(1'b0), .host_addr('0), .host_wdata('0), .host_rdata(),
    .par_we(rf_we[0]), .par_wdata(mid_wdata),
    .rd_all(mid_words)
  );

  register_file #(.N_WORDS(OUT_REGS), .DATA_W(DATA_W)) u_rf_out (
    .clk, .rst_n,
    .host_we(1'b0), .host_addr(out_addr), .host_wdata('0),
    .host_rdata(out_rdata),
    .par_we(rf_we[N_STAGES-1]), .par_wdata(out_wdata),
    .rd_all(out_words)
  );

  for (genvar s = 0; s < N_STAGES; s++) begin : g_row
    for (genvar l = 0; l < N_LANES; l++) begin : g_lane
      localparam int unsigned U = s * N_LANES + l;

      if (s == 0) begin : g_rm
        routing_matrix #(.N_SRC(IN_REGS)) u_rm (
          .clk, .rst_n,
          .cfg_we(unit_cfg_we[U]), .cfg_word, .cfg_data(cfg_bus), .sel(),
          .src(in_words), .load(launch[s]),
          .out_valid(rm_valid[s][l]), .op(rm_op[s][l])
        );
      end else begin : g_rm
        routing_matrix #(.N_SRC(N_SRC2)) u_rm (
          .clk, .rst_n,
          .cfg_we(unit_cfg_we[U]), .cfg_word, .cfg_data(cfg_bus), .sel(),
          .src({mid_words, in_words}), .load(launch[s]),
          .out_valid(rm_valid[s][l]), .op(rm_op[s][l])
        );
      end

      dot_vectors_unit u_dv (
        .clk, .rst_n,
        .cfg_we(unit_cfg_we[U]), .cfg_word, .cfg_data(cfg_bus), .mode(),
        .in_valid(rm_valid[s][l]), .op(rm_op[s][l]),
        .out_valid(dv_valid[s][l]), .out0(dv_out0[s][l]), .out1(dv_out1[s][l])
      );
    end
    // all lanes of a row run in lock step
    assign stage_done[s] = &dv_valid[s];
  end

  for (genvar l = 0; l < N_LANES; l++) begin : g_wb
    assign mid_wdata[2*l]   = dv_out0[0][l];
    assign mid_wdata[2*l+1] = dv_out1[0][l];
    assign out_wdata[2*l]   = dv_out0[N_STAGES-1][l];
    assign out_wdata[2*l+1] = dv_out1[N_STAGES-1][l];
  end
endmodule
