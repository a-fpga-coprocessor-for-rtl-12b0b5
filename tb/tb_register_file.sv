// tb_register_file: random host writes, parallel writes and both at once
// against a model array; checks rd_all, host_rdata, the priority of the
// parallel port, out-of-range host addresses and reset to zero.
module tb_register_file;
  localparam int unsigned N  = 24;   // not a power of two: exercises the range check
  localparam int unsigned AW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic par_we = 1'b0;
  logic [N-1:0][31:0] par_wdata = '0, rd_all, model;
  int checks = 0, failures = 0;

  register_file #(.N_WORDS(N), .DATA_W(32), .ADDR_W(AW)) dut (.*);

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

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(rd_all == '0, "reset");
    for (int it = 0; it < 5000; it++) begin
      host_we    = ($urandom_range(0, 1) == 1);
      host_addr  = AW'($urandom);
      host_wdata = $urandom;
      par_we     = ($urandom_range(0, 7) == 0);
      for (int k = 0; k < N; k++) par_wdata[k] = $urandom;
      #1;
      chk(host_rdata == ((32'(host_addr) < N) ? model[host_addr] : 32'h0), "host read");
      if (par_we) model = par_wdata;
      else if (host_we && 32'(host_addr) < N) model[host_addr] = host_wdata;
      @(negedge clk);
      chk(rd_all == model, $sformatf("contents after cycle %0d", it));
    end
    host_we = 1'b0; par_we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
