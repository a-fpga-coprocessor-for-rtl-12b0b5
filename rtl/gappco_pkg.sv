// gappco_pkg: sizes, types and the host address map shared by the GAPPCO
// coprocessor modules.
//
// The coprocessor has two rows (stages) of eight Dot Vectors units, each fed
// by its own routing matrix; 2 x 8 = 16 units is the configuration of the
// prototype. Data words are IEEE-754 single precision numbers. The register
// file sizes, the configuration word format, the operand select encoding and
// the host address map are choices of this design; the prototype's values
// are not published.
package gappco_pkg;

  // ---------------- array shape ----------------
  localparam int unsigned N_LANES  = 8;   // Dot Vectors units per row
  localparam int unsigned N_STAGES = 2;   // rows of routing matrix + DV units
  localparam int unsigned DATA_W   = 32;  // single precision float

  // Each Dot Vectors unit forms four products of operand pairs
  // (op[0]*op[1], op[2]*op[3], op[4]*op[5], op[6]*op[7]) and two results.
  localparam int unsigned DV_OPS   = 8;
  localparam int unsigned DV_OUTS  = 2;

  // ---------------- register files ----------------
  localparam int unsigned IN_REGS  = 32;                 // written by the host
  localparam int unsigned MID_REGS = N_LANES * DV_OUTS;  // row 1 results (16)
  localparam int unsigned OUT_REGS = N_LANES * DV_OUTS;  // row 2 results (16)

  // ---------------- operand selection ----------------
  // A select addresses a source word of its row: row 1 sees the input file
  // (0..31); row 2 sees the input file (0..31) followed by the intermediate
  // file (32..47). Any select past the last source reads +0.0.
  localparam int unsigned SEL_W    = 6;
  localparam logic [SEL_W-1:0] SEL_ZERO = '1;

  // ---------------- pipeline latencies (cycles) ----------------
  localparam int unsigned RM_LATENCY = 1;  // operand capture register
  localparam int unsigned DV_LATENCY = 3;  // multiply, pair add, final add

  // ---------------- Dot Vectors unit modes ----------------
  typedef enum logic {
    DV_MODE_2X2 = 1'b0,   // out0 = p0+p1, out1 = p2+p3
    DV_MODE_1X4 = 1'b1    // out0 = p0+p1+p2+p3, out1 = p2+p3
  } dv_mode_e;

  // ---------------- configuration stream ----------------
  // Two 32-bit words per unit (routing matrix + Dot Vectors unit pair):
  //   word 0: [31] mode, [23:0] selects 0..3 (select k at [6k+5:6k])
  //   word 1:            [23:0] selects 4..7
  // Units are numbered stage*N_LANES + lane and loaded in that order.
  localparam int unsigned CFG_WORDS_PER_UNIT = 2;
  localparam int unsigned N_UNITS   = N_STAGES * N_LANES;
  localparam int unsigned CFG_WORDS = N_UNITS * CFG_WORDS_PER_UNIT;  // 32
  localparam int unsigned CFG_MODE_BIT = 31;

  // ---------------- host address map (byte addresses) ----------------
  localparam int unsigned AXI_ADDR_W = 12;
  localparam logic [AXI_ADDR_W-1:0] ADDR_CTRL     = 12'h000; // W: [0] start, [1] config clear
  localparam logic [AXI_ADDR_W-1:0] ADDR_STATUS   = 12'h004; // R: [0] busy [1] done [2] cfg loaded [3] cfg overflow
  localparam logic [AXI_ADDR_W-1:0] ADDR_CFG_DATA = 12'h008; // W: next configuration word
  localparam logic [AXI_ADDR_W-1:0] ADDR_CYCLES   = 12'h00C; // R: cycles of the last run
  localparam logic [AXI_ADDR_W-1:0] ADDR_IN_BASE  = 12'h100; // RW: input register i at +4i
  localparam logic [AXI_ADDR_W-1:0] ADDR_OUT_BASE = 12'h200; // R: output register i at +4i

  typedef struct packed {
    logic cfg_overflow;
    logic cfg_loaded;
    logic done;
    logic busy;
  } status_t;

endpackage
