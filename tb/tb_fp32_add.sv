// tb_fp32_add: checks fp32_add against double precision reference sums on
// directed special cases, cancellation, far-apart exponents and random
// operand pairs.
module tb_fp32_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .y);

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z; #1;
    exp_y = ref_add(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    check(32'h3F80_0000, 32'h4000_0000);  // 1 + 2
    check(32'h3F80_0000, 32'hBF80_0000);  // 1 - 1
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0
    check(32'h0000_0000, 32'hC0A0_0000);  // 0 + -5
    check(32'h7F80_0000, 32'hFF80_0000);  // inf - inf -> NaN
    check(32'hFF80_0000, 32'h3F80_0000);  // -inf + 1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);  // overflow
    check(32'h0080_0001, 32'h8080_0000);  // result below normal range
    check(32'h3F80_0000, 32'h3380_0000);  // 1 + 2^-24: tie, stays even
    check(32'h3F80_0001, 32'h3380_0000);  // tie, rounds up to even
    check(32'h3F80_0000, 32'h4B80_0000);  // 1 + 2^24
    check(32'h3F80_0000, 32'hB3FF_FFFF);  // 1 - just under 2^-23
    for (int i = 0; i < 20000; i++)
      check(rand_f(100, 150), rand_f(100, 150));
    for (int i = 0; i < 5000; i++) begin  // close magnitudes, heavy cancellation
      r = rand_f(110, 140);
      check(r, {~r[31], r[30:8], 8'($urandom)});
    end
    for (int i = 0; i < 5000; i++) begin  // exponents within a few places
      r = rand_f(110, 140);
      check(r, {1'($urandom), r[30:23] - 8'($urandom_range(0, 3)), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
