// gappco_axi_top: the GAPPCO peripheral as seen by the host processor.
//
// The coprocessor is attached to the host's AMBA AXI bus as a custom slave
// peripheral: the host streams in the configuration produced by the
// geometric algebra compiler, writes the input registers, starts a run,
// polls the status and reads the output registers. This top joins the
// AXI4-Lite slave (axi_lite_slave) to the coprocessor (gappco_core); its
// ports are the AXI4-Lite slave signals plus clock and an active-low
// reset. The host processor itself is outside this design. The prototype
// runs host and coprocessor from one 333 MHz clock; here there is one clock,
// clk, for bus and coprocessor.
// Timing: see axi_lite_slave for the bus and gappco_core for a run
// (10 cycles from the write that starts it to status.done).
module gappco_axi_top
  import gappco_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AXI_ADDR_W-1:0] s_axi_awaddr,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [31:0]           s_axi_wdata,
  input  logic [3:0]            s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [AXI_ADDR_W-1:0] s_axi_araddr,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [31:0]           s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready
);
  logic                        in_we, cfg_clear, cfg_valid, start;
  logic [$clog2(IN_REGS)-1:0]  in_addr;
  logic [$clog2(OUT_REGS)-1:0] out_addr;
  logic [DATA_W-1:0]           in_wdata, in_rdata, out_rdata;
  logic [31:0]                 cfg_data, run_cycles;
  status_t                     status;

  axi_lite_slave u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .in_we, .in_addr, .in_wdata, .in_rdata,
    .out_addr, .out_rdata,
    .cfg_clear, .cfg_valid, .cfg_data, .start,
    .status, .run_cycles
  );

  gappco_core u_core (
    .clk, .rst_n,
    .in_we, .in_addr, .in_wdata, .in_rdata,
    .out_addr, .out_rdata,
    .cfg_clear, .cfg_valid, .cfg_data, .start,
    .status, .run_cycles
  );
endmodule
