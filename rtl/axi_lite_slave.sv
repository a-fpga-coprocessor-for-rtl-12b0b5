// axi_lite_slave: the host bus interface of the GAPPCO peripheral.
//
// The coprocessor sits on the host processor's AMBA AXI bus as a slave
// peripheral with input registers (written by the host) and output
// registers (read by the host). This module is the AXI4-Lite slave that
// reaches them and the coprocessor's control registers; the address map is
// in gappco_pkg (byte addresses, 32-bit words):
//   0x000 CTRL     W  bit 0 starts a run, bit 1 clears the configuration
//   0x004 STATUS   R  {cfg_overflow, cfg_loaded, done, busy}
//   0x008 CFG_DATA W  next word of the configuration stream
//   0x00C CYCLES   R  busy cycles of the last run
//   0x100+4i       RW input register i  (i < IN_REGS)
//   0x200+4i       R  output register i (i < OUT_REGS)
// Other addresses answer SLVERR; CTRL and CFG_DATA read as 0. Write strobes
// are ignored: every write is a whole word.
// Timing: a write is taken when AWVALID and WVALID are both high and no
// write response is pending (AWREADY = WREADY = 1 in that cycle) and acts
// in that cycle; BVALID follows one cycle later. A read is taken when
// ARVALID is high, no read data is pending and no write is taken in the
// same cycle (the register files have one host address port); RVALID with
// the data follows one cycle later. Only the use of AXI and the input and
// output registers come from the description of the prototype; the rest is
// this design's choice.
module axi_lite_slave
  import gappco_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // AXI4-Lite slave
  input  logic [AXI_ADDR_W-1:0]       s_axi_awaddr,
  input  logic                        s_axi_awvalid,
  output logic                        s_axi_awready,
  input  logic [31:0]                 s_axi_wdata,
  input  logic [3:0]                  s_axi_wstrb,
  input  logic                        s_axi_wvalid,
  output logic                        s_axi_wready,
  output logic [1:0]                  s_axi_bresp,
  output logic                        s_axi_bvalid,
  input  logic                        s_axi_bready,
  input  logic [AXI_ADDR_W-1:0]       s_axi_araddr,
  input  logic                        s_axi_arvalid,
  output logic                        s_axi_arready,
  output logic [31:0]                 s_axi_rdata,
  output logic [1:0]                  s_axi_rresp,
  output logic                        s_axi_rvalid,
  input  logic                        s_axi_rready,
  // to the coprocessor
  output logic                        in_we,
  output logic [$clog2(IN_REGS)-1:0]  in_addr,
  output logic [DATA_W-1:0]           in_wdata,
  input  logic [DATA_W-1:0]           in_rdata,
  output logic [$clog2(OUT_REGS)-1:0] out_addr,
  input  logic [DATA_W-1:0]           out_rdata,
  output logic                        cfg_clear,
  output logic                        cfg_valid,
  output logic [31:0]                 cfg_data,
  output logic                        start,
  input  status_t                     status,
  input  logic [31:0]                 run_cycles
);
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam int unsigned IN_AW  = $clog2(IN_REGS);
  localparam int unsigned OUT_AW = $clog2(OUT_REGS);

  typedef enum logic [2:0] {
    R_CTRL, R_STATUS, R_CFG, R_CYCLES, R_IN, R_OUT, R_NONE
  } region_e;

  function automatic region_e decode(input logic [AXI_ADDR_W-1:0] a);
    logic [AXI_ADDR_W-1:0] word = a & ~AXI_ADDR_W'(3);
    if (word == ADDR_CTRL)     return R_CTRL;
    if (word == ADDR_STATUS)   return R_STATUS;
    if (word == ADDR_CFG_DATA) return R_CFG;
    if (word == ADDR_CYCLES)   return R_CYCLES;
    if (word >= ADDR_IN_BASE && word < ADDR_IN_BASE + AXI_ADDR_W'(4 * IN_REGS))
      return R_IN;
    if (word >= ADDR_OUT_BASE && word < ADDR_OUT_BASE + AXI_ADDR_W'(4 * OUT_REGS))
      return R_OUT;
    return R_NONE;
  endfunction

  logic    wr_take, rd_take;
  region_e wr_region, rd_region;
  logic [AXI_ADDR_W-1:0] wr_off, rd_off;

  assign wr_take   = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign rd_take   = s_axi_arvalid && !s_axi_rvalid && !wr_take;
  assign wr_region = decode(s_axi_awaddr);
  assign rd_region = decode(s_axi_araddr);
  assign wr_off    = (s_axi_awaddr - ADDR_IN_BASE) >> 2;
  assign rd_off    = (s_axi_araddr - ((rd_region == R_IN) ? ADDR_IN_BASE
                                                          : ADDR_OUT_BASE)) >> 2;

  assign s_axi_awready = wr_take;
  assign s_axi_wready  = wr_take;
  assign s_axi_arready = rd_take;

  // register side effects of a write, in the cycle it is taken
  assign in_we     = wr_take && (wr_region == R_IN);
  assign in_addr   = wr_take ? wr_off[IN_AW-1:0] : rd_off[IN_AW-1:0];
  assign in_wdata  = s_axi_wdata;
  assign out_addr  = rd_off[OUT_AW-1:0];
  assign cfg_valid = wr_take && (wr_region == R_CFG);
  assign cfg_data  = s_axi_wdata;
  assign start     = wr_take && (wr_region == R_CTRL) && s_axi_wdata[0];
  assign cfg_clear = wr_take && (wr_region == R_CTRL) && s_axi_wdata[1];

  logic unused_wstrb;
  assign unused_wstrb = ^s_axi_wstrb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
      s_axi_rvalid <= 1'b0;
      s_axi_rresp  <= RESP_OKAY;
      s_axi_rdata  <= '0;
    end else begin
      if (wr_take) begin
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= (wr_region inside {R_CTRL, R_CFG, R_IN}) ? RESP_OKAY
                                                                 : RESP_SLVERR;
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      if (rd_take) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= (rd_region == R_NONE) ? RESP_SLVERR : RESP_OKAY;
        unique case (rd_region)
          R_STATUS: s_axi_rdata <= 32'(status);
          R_CYCLES: s_axi_rdata <= run_cycles;
          R_IN:     s_axi_rdata <= in_rdata;
          R_OUT:    s_axi_rdata <= out_rdata;
          default:  s_axi_rdata <= '0;
        endcase
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid and unchanged until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp))
    else $error("axi_lite_slave: write response dropped");
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata))
    else $error("axi_lite_slave: read data dropped");
endmodule
