// tb_gappco_core: runs programs on the coprocessor through its host-side
// ports: 30 random programs with random inputs (both modes, all select
// ranges, zero selects) and the 5D conformal reflection with random
// vectors. Every output word is checked bit for bit against the reference
// model, and each run must take 10 cycles from start to done.
module tb_gappco_core;
  import gappco_pkg::*;
  import fp_ref_pkg::*;
  import gappco_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we = 1'b0;
  logic [$clog2(IN_REGS)-1:0]  in_addr = '0;
  logic [DATA_W-1:0]           in_wdata = '0, in_rdata, out_rdata;
  logic [$clog2(OUT_REGS)-1:0] out_addr = '0;
  logic cfg_clear = 1'b0, cfg_valid = 1'b0, start = 1'b0;
  logic [31:0] cfg_data = '0, run_cycles;
  status_t status;
  int checks = 0, failures = 0;

  gappco_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic load(input prog_t p);
    stream_t s = encode(p);
    @(negedge clk);
    cfg_clear = 1'b1;
    @(negedge clk);
    cfg_clear = 1'b0;
    for (int i = 0; i < CFG_WORDS; i++) begin
      cfg_valid = 1'b1; cfg_data = s[i];
      @(negedge clk);
    end
    cfg_valid = 1'b0;
    chk(status.cfg_loaded, "configuration loaded");
  endtask

  task automatic run_check(input prog_t p, input in_t in, output out_t got);
    mid_t mid;
    out_t out;
    int n = 0;
    @(negedge clk);
    for (int k = 0; k < IN_REGS; k++) begin
      in_we = 1'b1; in_addr = 5'(k); in_wdata = in[k];
      @(negedge clk);
    end
    in_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!status.done && n < 100) begin @(negedge clk); n++; end
    chk(status.done && !status.busy, "run completes");
    chk(run_cycles == 32'd10, $sformatf("run took %0d cycles", run_cycles));
    run(p, in, mid, out);
    for (int k = 0; k < MID_REGS; k++)
      chk(dut.mid_words[k] === mid[k], $sformatf("intermediate %0d", k));
    for (int k = 0; k < OUT_REGS; k++) begin
      out_addr = 4'(k);
      #1;
      got[k] = out_rdata;
      chk(out_rdata === out[k], $sformatf("output %0d = %h, expected %h", k, out_rdata, out[k]));
    end
  endtask

  initial begin
    prog_t p;
    in_t in;
    out_t got;
    real a [5], x [5], y [5];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      p = random_prog();
      load(p);
      for (int k = 0; k < IN_REGS; k++) in[k] = rand_f(110, 140);
      run_check(p, in, got);
    end
    p = reflect_prog();
    load(p);
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 5; k++) begin
        a[k] = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        x[k] = real'($urandom_range(0, 20000)) / 1000.0 - 10.0;
      end
      in = reflect_inputs(a, x);
      run_check(p, in, got);
      reflect_exact(a, x, y);
      for (int i = 0; i < 5; i++) begin
        real d;
        d = f2r(got[2*i]) - y[i];
        if (d < 0.0) d = -d;
        chk(d < 1.0e-3, $sformatf("reflection component %0d: %f vs %f", i, f2r(got[2*i]), y[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
