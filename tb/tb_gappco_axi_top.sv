// tb_gappco_axi_top: end-to-end test of the GAPPCO peripheral through its
// AXI4-Lite port, at the default sizes, in the order a host program uses
// it: stream the configuration, write the input registers, start, poll
// the status until done, read the output registers.
//  - start before any configuration (must be ignored),
//  - a surplus configuration word (overflow flag), then a clear,
//  - 12 random programs on random data, bit-exact against the model,
//  - 10 executions of the 5D conformal reflection program, bit-exact and
//    within a tolerance of the closed form, with the bus cycles per
//    execution reported,
//  - reads and writes of unmapped addresses (SLVERR).
// It counts how often each mechanism happened (both unit modes, zero
// selects, row-2 reads of the input file and of the intermediate file,
// busy seen while polling, overflow, ignored start, SLVERR) and counts a
// failure for any that never did.
module tb_gappco_axi_top;
  import gappco_pkg::*;
  import fp_ref_pkg::*;
  import gappco_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AXI_ADDR_W-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 1'b0, s_axi_wvalid = 1'b0, s_axi_bready = 1'b0;
  logic s_axi_arvalid = 1'b0, s_axi_rready = 1'b0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_mode_2x2, n_mode_1x4, n_zero_sel, n_bypass, n_chain;
  int n_busy_polls, n_overflow, n_start_ignored, n_slverr, n_reflections;

  gappco_axi_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (2000000) @(posedge clk);
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

  task automatic wr(input logic [AXI_ADDR_W-1:0] a, input logic [31:0] d,
                    output logic [1:0] resp);
    @(negedge clk);
    s_axi_awaddr = a; s_axi_awvalid = 1'b1;
    s_axi_wdata = d;  s_axi_wvalid = 1'b1;
    s_axi_bready = 1'b1;
    do @(negedge clk); while (!s_axi_bvalid);
    // the write was taken on the edge before; the response is here now
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0;
    resp = s_axi_bresp;
    @(negedge clk);
    s_axi_bready = 1'b0;
    if (resp != 2'b00) n_slverr++;
  endtask

  task automatic rd(input logic [AXI_ADDR_W-1:0] a, output logic [31:0] d,
                    output logic [1:0] resp);
    @(negedge clk);
    s_axi_araddr = a; s_axi_arvalid = 1'b1; s_axi_rready = 1'b1;
    do @(negedge clk); while (!s_axi_rvalid);
    s_axi_arvalid = 1'b0;
    d = s_axi_rdata; resp = s_axi_rresp;
    @(negedge clk);
    s_axi_rready = 1'b0;
    if (resp != 2'b00) n_slverr++;
  endtask

  task automatic wr_ok(input logic [AXI_ADDR_W-1:0] a, input logic [31:0] d);
    logic [1:0] r;
    wr(a, d, r);
    chk(r == 2'b00, $sformatf("write %h answered OKAY", a));
  endtask

  task automatic rd_status(output status_t st);
    logic [31:0] d;
    logic [1:0] r;
    rd(ADDR_STATUS, d, r);
    st = status_t'(d[3:0]);
  endtask

  task automatic configure(input prog_t p);
    stream_t s = encode(p);
    status_t st;
    wr_ok(ADDR_CTRL, 32'h2);  // clear
    for (int i = 0; i < CFG_WORDS; i++) wr_ok(ADDR_CFG_DATA, s[i]);
    rd_status(st);
    chk(st.cfg_loaded && !st.cfg_overflow, "configuration loaded");
    // the units now hold the program
    for (int u = 0; u < N_UNITS; u++) begin
      if (p[u].mode == DV_MODE_1X4) n_mode_1x4++; else n_mode_2x2++;
      for (int k = 0; k < DV_OPS; k++) begin
        if (p[u].sel[k] == SEL_ZERO) n_zero_sel++;
        else if (u >= N_LANES && p[u].sel[k] < IN_REGS) n_bypass++;
        else if (u >= N_LANES) n_chain++;
      end
    end
  endtask

  task automatic execute(input prog_t p, input in_t in, output out_t got,
                         output longint bus_cycles);
    mid_t mid;
    out_t out;
    status_t st;
    logic [31:0] d;
    logic [1:0] r;
    longint c0 = cycle;
    int polls = 0;
    for (int k = 0; k < IN_REGS; k++) wr_ok(ADDR_IN_BASE + AXI_ADDR_W'(4 * k), in[k]);
    wr_ok(ADDR_CTRL, 32'h1);
    do begin
      rd_status(st);
      if (st.busy) n_busy_polls++;
      polls++;
    end while (!st.done && polls < 50);
    chk(st.done, "run done");
    rd(ADDR_CYCLES, d, r);
    chk(d == 32'd10, $sformatf("run took %0d cycles", d));
    run(p, in, mid, out);
    for (int k = 0; k < OUT_REGS; k++) begin
      rd(ADDR_OUT_BASE + AXI_ADDR_W'(4 * k), d, r);
      got[k] = d;
      chk(r == 2'b00 && d === out[k], $sformatf("output %0d = %h, expected %h", k, d, out[k]));
    end
    bus_cycles = cycle - c0;
  endtask

  initial begin
    prog_t p;
    in_t in;
    out_t got;
    status_t st;
    logic [31:0] d;
    logic [1:0] r;
    longint bc, total;
    real a [5], x [5], y [5];

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // start with no configuration: ignored
    wr_ok(ADDR_CTRL, 32'h1);
    repeat (3) @(negedge clk);
    rd_status(st);
    chk(!st.busy && !st.done, "start ignored without configuration");
    if (!st.busy && !st.done) n_start_ignored++;

    // overflow: one word too many
    p = random_prog();
    configure(p);
    wr_ok(ADDR_CFG_DATA, 32'h0);
    rd_status(st);
    chk(st.cfg_overflow, "overflow flag");
    if (st.cfg_overflow) n_overflow++;

    // unmapped accesses
    wr(12'hF00, 32'h1, r);
    chk(r == 2'b10, "SLVERR on an unmapped write");
    rd(12'h0F0, d, r);
    chk(r == 2'b10, "SLVERR on an unmapped read");

    // input registers read back
    wr_ok(ADDR_IN_BASE + 12'd20, 32'h1234_5678);
    rd(ADDR_IN_BASE + 12'd20, d, r);
    chk(d == 32'h1234_5678, "input register read back");

    // random programs
    for (int n = 0; n < 12; n++) begin
      p = random_prog();
      configure(p);
      for (int k = 0; k < IN_REGS; k++) in[k] = rand_f(110, 140);
      execute(p, in, got, bc);
    end

    // the reflection workload
    p = reflect_prog();
    configure(p);
    total = 0;
    for (int n = 0; n < 10; n++) begin
      for (int k = 0; k < 5; k++) begin
        a[k] = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        x[k] = real'($urandom_range(0, 20000)) / 1000.0 - 10.0;
      end
      in = reflect_inputs(a, x);
      execute(p, in, got, bc);
      total += bc;
      reflect_exact(a, x, y);
      for (int i = 0; i < 5; i++) begin
        real e;
        e = f2r(got[2*i]) - y[i];
        if (e < 0.0) e = -e;
        chk(e < 1.0e-3, $sformatf("reflection %0d component %0d", n, i));
      end
      n_reflections++;
    end
    $display("reflection: %0d bus cycles per execution (inputs, start, polling, all outputs)",
             total / 10);

    $display("mechanisms: 2x2=%0d 1x4=%0d zero_sel=%0d bypass=%0d chain=%0d busy_polls=%0d",
             n_mode_2x2, n_mode_1x4, n_zero_sel, n_bypass, n_chain, n_busy_polls);
    $display("mechanisms: overflow=%0d start_ignored=%0d slverr=%0d reflections=%0d",
             n_overflow, n_start_ignored, n_slverr, n_reflections);
    chk(n_mode_2x2 > 0, "2x2 mode used");
    chk(n_mode_1x4 > 0, "1x4 mode used");
    chk(n_zero_sel > 0, "zero select used");
    chk(n_bypass > 0, "row 2 read the input file");
    chk(n_chain > 0, "row 2 read the intermediate file");
    chk(n_busy_polls > 0, "busy seen while polling");
    chk(n_overflow > 0, "configuration overflow");
    chk(n_start_ignored > 0, "start ignored");
    chk(n_slverr > 0, "SLVERR response");
    chk(n_reflections > 0, "reflection executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
