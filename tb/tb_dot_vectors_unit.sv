// tb_dot_vectors_unit: streams random operand sets into a Dot Vectors unit
// in both modes, one set per cycle with gaps, and checks every result and
// its 3-cycle latency against reference sums of products. Also checks that
// only configuration word 0 sets the mode.
module tb_dot_vectors_unit;
  import gappco_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_word = 1'b0;
  logic [31:0] cfg_data = '0;
  dv_mode_e mode;
  logic in_valid = 1'b0;
  logic [DV_OPS-1:0][DATA_W-1:0] op = '0;
  logic out_valid;
  logic [DATA_W-1:0] out0, out1;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    logic [31:0] e0, e1;
    int          due;
  } exp_t;
  exp_t q[$];

  dot_vectors_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic set_mode(input dv_mode_e m, input bit word);
    @(negedge clk);
    cfg_we = 1'b1; cfg_word = word;
    cfg_data = {1'(m), 7'd0, 24'($urandom)};
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // scoreboard: every output must match the oldest expected result, due
  // exactly DV_LATENCY cycles after its input
  always @(posedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      if (q.size() == 0) chk(1'b0, "unexpected out_valid");
      else begin
        e = q.pop_front();
        chk(cycle == e.due, "latency");
        chk(out0 === e.e0, $sformatf("out0 %h exp %h", out0, e.e0));
        chk(out1 === e.e1, $sformatf("out1 %h exp %h", out1, e.e1));
      end
    end
  end

  task automatic run_sets(input int n, input dv_mode_e m);
    for (int i = 0; i < n; i++) begin
      logic [31:0] p [4];
      logic [31:0] s0, s1;
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < DV_OPS; k++) op[k] = rand_f(110, 140);
      if (i % 7 == 0) op[1] = 32'h0;  // a zero operand
      if (in_valid) begin
        for (int k = 0; k < 4; k++) p[k] = ref_mul(op[2*k], op[2*k+1]);
        s0 = ref_add(p[0], p[1]);
        s1 = ref_add(p[2], p[3]);
        e.e0 = (m == DV_MODE_1X4) ? ref_add(s0, s1) : s0;
        e.e1 = s1;
        e.due = cycle + 1 + DV_LATENCY;  // sampled at the next edge
        q.push_back(e);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (DV_LATENCY + 2) @(negedge clk);
    chk(q.size() == 0, "all results delivered");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    chk(mode == DV_MODE_2X2, "reset mode");
    set_mode(DV_MODE_1X4, 1'b0);
    chk(mode == DV_MODE_1X4, "mode set by word 0");
    set_mode(DV_MODE_2X2, 1'b1);
    chk(mode == DV_MODE_1X4, "word 1 leaves mode");
    run_sets(2000, DV_MODE_1X4);
    set_mode(DV_MODE_2X2, 1'b0);
    chk(mode == DV_MODE_2X2, "mode back to 2x2");
    run_sets(2000, DV_MODE_2X2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
