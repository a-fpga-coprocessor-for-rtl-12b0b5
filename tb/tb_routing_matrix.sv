// tb_routing_matrix: loads random select words into a row-2 sized routing
// matrix (48 sources), captures random source sets and checks every
// operand against the select (a select past the last source gives +0.0),
// the one-cycle capture latency and that operands hold when load is low.
module tb_routing_matrix;
  import gappco_pkg::*;

  localparam int unsigned NS = IN_REGS + MID_REGS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_word = 1'b0;
  logic [31:0] cfg_data = '0;
  logic [DV_OPS-1:0][SEL_W-1:0] sel;
  logic [NS-1:0][DATA_W-1:0] src;
  logic load = 1'b0;
  logic out_valid;
  logic [DV_OPS-1:0][DATA_W-1:0] op;
  int checks = 0, failures = 0;

  routing_matrix #(.N_SRC(NS)) dut (.*);

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [SEL_W-1:0] pick();
    // mostly valid sources, sometimes a select past the end
    return ($urandom_range(0, 5) == 0) ? SEL_W'($urandom_range(NS, 2**SEL_W - 1))
                                       : SEL_W'($urandom_range(0, NS - 1));
  endfunction

  initial begin
    logic [DV_OPS-1:0][SEL_W-1:0] want;
    logic [DV_OPS-1:0][DATA_W-1:0] held;
    src = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < DV_OPS; k++) chk(op[k] == '0 && sel[k] == SEL_ZERO, "reset state");
    for (int it = 0; it < 500; it++) begin
      for (int k = 0; k < DV_OPS; k++) want[k] = pick();
      // configuration: word 0 then word 1
      for (int w = 0; w < 2; w++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_word = w[0];
        cfg_data = {8'($urandom), want[4*w+3], want[4*w+2], want[4*w+1], want[4*w]};
      end
      @(negedge clk);
      cfg_we = 1'b0;
      chk(sel == want, "select registers");
      for (int k = 0; k < NS; k++) src[k] = $urandom;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      chk(out_valid, "out_valid one cycle after load");
      for (int k = 0; k < DV_OPS; k++)
        chk(op[k] == ((32'(want[k]) < NS) ? src[want[k]] : 32'h0),
            $sformatf("operand %0d select %0d", k, want[k]));
      held = op;
      for (int k = 0; k < NS; k++) src[k] = $urandom;
      @(negedge clk);
      chk(!out_valid, "out_valid is a pulse");
      chk(op == held, "operands hold without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
