// tb_axi_lite_slave: an AXI4-Lite master drives the slave with writes and
// reads to every region of the address map, with random response
// back-pressure and address/data phases that arrive in different cycles.
// Checks the register side effects (input register writes, configuration
// words, start, configuration clear), the read data of every region, OKAY
// and SLVERR responses and the one-cycle response timing.
module tb_axi_lite_slave;
  import gappco_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AXI_ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 1'b0, s_axi_wvalid = 1'b0, s_axi_bready = 1'b0;
  logic s_axi_arvalid = 1'b0, s_axi_rready = 1'b0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic in_we, cfg_clear, cfg_valid, start;
  logic [$clog2(IN_REGS)-1:0]  in_addr;
  logic [$clog2(OUT_REGS)-1:0] out_addr;
  logic [DATA_W-1:0] in_wdata, in_rdata, out_rdata;
  logic [31:0] cfg_data, run_cycles;
  status_t status;
  int checks = 0, failures = 0;

  // side effects seen in the last write
  int n_in_we, n_cfg, n_start, n_clear;
  logic [31:0] last_in_data, last_cfg;
  logic [$clog2(IN_REGS)-1:0] last_in_addr;

  axi_lite_slave dut (.*);

  // core side: data that tells which word was addressed
  assign in_rdata  = 32'hA500_0000 | 32'(in_addr);
  assign out_rdata = 32'h5A00_0000 | 32'(out_addr);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (in_we)     begin n_in_we++; last_in_addr = in_addr; last_in_data = in_wdata; end
    if (cfg_valid) begin n_cfg++; last_cfg = cfg_data; end
    if (start)     n_start++;
    if (cfg_clear) n_clear++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic axi_write(input logic [AXI_ADDR_W-1:0] a, input logic [31:0] d,
                           output logic [1:0] resp);
    int lag = $urandom_range(0, 2);
    int n;
    n_in_we = 0; n_cfg = 0; n_start = 0; n_clear = 0;
    @(negedge clk);
    s_axi_awaddr = a; s_axi_awvalid = 1'b1;
    repeat (lag) begin
      @(negedge clk);
      chk(!s_axi_awready, "no write taken before the data");
    end
    s_axi_wdata = d; s_axi_wvalid = 1'b1;
    #1;
    chk(s_axi_awready && s_axi_wready, "write taken with address and data");
    @(negedge clk);
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0;
    chk(s_axi_bvalid, "BVALID one cycle after the write");
    n = $urandom_range(0, 2);
    repeat (n) begin
      @(negedge clk);
      chk(s_axi_bvalid, "BVALID held while BREADY is low");
    end
    s_axi_bready = 1'b1;
    resp = s_axi_bresp;
    @(negedge clk);
    s_axi_bready = 1'b0;
    chk(!s_axi_bvalid, "BVALID dropped after acceptance");
  endtask

  task automatic axi_read(input logic [AXI_ADDR_W-1:0] a, output logic [31:0] d,
                          output logic [1:0] resp);
    int n;
    @(negedge clk);
    s_axi_araddr = a; s_axi_arvalid = 1'b1;
    #1;
    chk(s_axi_arready, "read address taken");
    @(negedge clk);
    s_axi_arvalid = 1'b0;
    s_axi_araddr = AXI_ADDR_W'($urandom);  // must not matter any more
    chk(s_axi_rvalid, "RVALID one cycle after the address");
    n = $urandom_range(0, 2);
    repeat (n) @(negedge clk);
    chk(s_axi_rvalid, "RVALID held");
    d = s_axi_rdata; resp = s_axi_rresp;
    s_axi_rready = 1'b1;
    @(negedge clk);
    s_axi_rready = 1'b0;
    chk(!s_axi_rvalid, "RVALID dropped after acceptance");
  endtask

  initial begin
    logic [1:0] r;
    logic [31:0] d, w;
    int idx;
    status = '0; run_cycles = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      // input register write
      idx = $urandom_range(0, IN_REGS - 1);
      w = $urandom;
      axi_write(ADDR_IN_BASE + AXI_ADDR_W'(4 * idx), w, r);
      chk(r == 2'b00 && n_in_we == 1 && last_in_addr == 5'(idx) && last_in_data == w,
          "input register write");
      chk(n_cfg + n_start + n_clear == 0, "no other side effect");
      // configuration word
      w = $urandom;
      axi_write(ADDR_CFG_DATA, w, r);
      chk(r == 2'b00 && n_cfg == 1 && last_cfg == w && n_in_we == 0, "configuration word");
      // control
      w = 32'($urandom_range(0, 3));
      axi_write(ADDR_CTRL, w, r);
      chk(r == 2'b00 && n_start == int'(w[0]) && n_clear == int'(w[1]), "control write");
      // write to a read-only or unmapped address
      axi_write(($urandom_range(0, 1) == 1) ? ADDR_STATUS : 12'h800, $urandom, r);
      chk(r == 2'b10 && n_in_we + n_cfg + n_start + n_clear == 0, "SLVERR write");
      // reads
      idx = $urandom_range(0, IN_REGS - 1);
      axi_read(ADDR_IN_BASE + AXI_ADDR_W'(4 * idx), d, r);
      chk(r == 2'b00 && d == (32'hA500_0000 | 32'(idx)), "input register read");
      idx = $urandom_range(0, OUT_REGS - 1);
      axi_read(ADDR_OUT_BASE + AXI_ADDR_W'(4 * idx), d, r);
      chk(r == 2'b00 && d == (32'h5A00_0000 | 32'(idx)), "output register read");
      status = 4'($urandom);
      axi_read(ADDR_STATUS, d, r);
      chk(r == 2'b00 && d == 32'(status), "status read");
      run_cycles = $urandom;
      axi_read(ADDR_CYCLES, d, r);
      chk(r == 2'b00 && d == run_cycles, "cycle count read");
      axi_read(ADDR_OUT_BASE + AXI_ADDR_W'(4 * OUT_REGS), d, r);
      chk(r == 2'b10, "SLVERR read past the output file");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
