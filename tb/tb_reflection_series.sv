// tb_reflection_series: the reflection workload in series of 1, 10, 100,
// 1000 and 10000 executions, as a host would run it through the AXI4-Lite
// port. The configuration and the constant input word (-2.0) are loaded
// once; each execution writes the 11 words that change (a, x, -a5),
// starts, polls until done and reads the 5 result words. Every result is
// checked bit for bit against the reference model, and the bus cycles per
// series are reported (computation is 10 of them per execution; the rest
// is bus traffic).
module tb_reflection_series;
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

  gappco_axi_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (10000000) @(posedge clk);
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

  // single-beat transactions, address and data together, ready to accept
  task automatic wr(input logic [AXI_ADDR_W-1:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axi_awaddr = a; s_axi_awvalid = 1'b1;
    s_axi_wdata = d;  s_axi_wvalid = 1'b1;
    s_axi_bready = 1'b1;
    do @(negedge clk); while (!s_axi_bvalid);
    s_axi_awvalid = 1'b0; s_axi_wvalid = 1'b0;
    chk(s_axi_bresp == 2'b00, "write OKAY");
    @(negedge clk);
    s_axi_bready = 1'b0;
  endtask

  task automatic rd(input logic [AXI_ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axi_araddr = a; s_axi_arvalid = 1'b1; s_axi_rready = 1'b1;
    do @(negedge clk); while (!s_axi_rvalid);
    s_axi_arvalid = 1'b0;
    d = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 1'b0;
  endtask

  initial begin
    prog_t p;
    stream_t s;
    in_t in;
    mid_t mid;
    out_t out;
    real a [5], x [5];
    logic [31:0] d;
    longint c0;
    int series [5] = '{1, 10, 100, 1000, 10000};
    int n_exec = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    p = reflect_prog();
    s = encode(p);
    wr(ADDR_CTRL, 32'h2);
    for (int i = 0; i < CFG_WORDS; i++) wr(ADDR_CFG_DATA, s[i]);
    wr(ADDR_IN_BASE + 12'd44, MINUS_TWO);

    foreach (series[j]) begin
      c0 = cycle;
      for (int e = 0; e < series[j]; e++) begin
        for (int k = 0; k < 5; k++) begin
          a[k] = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
          x[k] = real'($urandom_range(0, 20000)) / 1000.0 - 10.0;
        end
        in = reflect_inputs(a, x);
        for (int k = 0; k < 11; k++) wr(ADDR_IN_BASE + AXI_ADDR_W'(4 * k), in[k]);
        wr(ADDR_CTRL, 32'h1);
        do rd(ADDR_STATUS, d); while (!d[1]);
        run(p, in, mid, out);
        for (int i = 0; i < 5; i++) begin
          rd(ADDR_OUT_BASE + AXI_ADDR_W'(8 * i), d);
          chk(d === out[2*i], $sformatf("execution %0d component %0d", e, i));
        end
        n_exec++;
      end
      $display("series of %0d executions: %0d cycles, %0d per execution",
               series[j], cycle - c0, (cycle - c0) / series[j]);
    end
    chk(n_exec == 11111, "all executions run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
