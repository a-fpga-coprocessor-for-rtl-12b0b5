// tb_control_unit: drives the control unit as the host and as the rows.
// Checks the distribution of the configuration stream (one-hot unit
// enable, word number, ordering), cfg_loaded and cfg_overflow, that a
// start without configuration is ignored, and the run sequence: launch per
// row, rf_we when the row reports, done, and the run cycle count. A model
// of the rows answers each launch after RM_LATENCY + DV_LATENCY cycles.
module tb_control_unit;
  import gappco_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_clear = 1'b0, cfg_valid = 1'b0;
  logic [31:0] cfg_data = '0;
  logic [N_UNITS-1:0] unit_cfg_we;
  logic cfg_word;
  logic [31:0] cfg_data_o;
  logic start = 1'b0;
  logic [N_STAGES-1:0] launch, stage_done, rf_we;
  status_t status;
  logic [31:0] run_cycles;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // rows: a launch comes back as stage_done after the row's latency
  localparam int unsigned ROW_LAT = RM_LATENCY + DV_LATENCY;
  logic [N_STAGES-1:0] pipe [ROW_LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < ROW_LAT; i++) pipe[i] <= '0;
    else begin
      pipe[0] <= launch;
      for (int i = 1; i < ROW_LAT; i++) pipe[i] <= pipe[i-1];
    end
  end
  assign stage_done = pipe[ROW_LAT-1];

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

  task automatic send_word(input logic [31:0] w, input int idx);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_data = w;
    #1;
    if (idx >= 0) begin
      chk(unit_cfg_we == (N_UNITS'(1) << (idx / 2)), $sformatf("unit enable for word %0d", idx));
      chk(cfg_word == idx[0], "word number");
      chk(cfg_data_o == w, "data broadcast");
    end else begin
      chk(unit_cfg_we == '0, "no enable for a surplus word");
    end
    @(negedge clk);
    cfg_valid = 1'b0;
  endtask

  task automatic do_run(output int cycles_seen);
    int t0, n;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(status.busy, "busy after start");
    n = 1;
    for (int s = 0; s < N_STAGES; s++) begin
      // launch of row s, then rf_we of row s after the row latency
      while (!launch[s] && n < 50) begin @(negedge clk); n++; end
      chk(launch == (N_STAGES'(1) << s), $sformatf("launch row %0d", s));
      t0 = n;
      while (!rf_we[s] && n < 50) begin @(negedge clk); n++; end
      chk(rf_we == (N_STAGES'(1) << s), $sformatf("rf_we row %0d", s));
      chk(n - t0 == ROW_LAT, $sformatf("row %0d latency %0d", s, n - t0));
      @(negedge clk); n++;
    end
    chk(!status.busy && status.done, "done after last row");
    cycles_seen = n - 1;
  endtask

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(status == '0, "reset status");
    // start without configuration is ignored
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    chk(!status.busy && launch == '0, "start ignored without configuration");
    // stream
    for (int i = 0; i < CFG_WORDS; i++) begin
      chk(!status.cfg_loaded, "not loaded before the last word");
      send_word($urandom, i);
    end
    chk(status.cfg_loaded && !status.cfg_overflow, "loaded");
    send_word(32'hDEAD_BEEF, -1);
    chk(status.cfg_overflow && status.cfg_loaded, "overflow on a surplus word");
    // two runs
    for (int r = 0; r < 2; r++) begin
      do_run(c);
      chk(run_cycles == 32'(c), $sformatf("run_cycles %0d, counted %0d", run_cycles, c));
      chk(run_cycles == 32'd10, "10-cycle run");
    end
    // clear and reload, with a word sent during a run being dropped
    @(negedge clk);
    cfg_clear = 1'b1;
    @(negedge clk);
    cfg_clear = 1'b0;
    chk(!status.cfg_loaded && !status.cfg_overflow, "cleared");
    for (int i = 0; i < CFG_WORDS; i++) send_word($urandom, i);
    chk(status.cfg_loaded, "reloaded");
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cfg_valid = 1'b1;
    #1;
    chk(unit_cfg_we == '0, "no configuration during a run");
    @(negedge clk);
    cfg_valid = 1'b0;
    repeat (12) @(negedge clk);
    chk(status.done && !status.busy, "run finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
