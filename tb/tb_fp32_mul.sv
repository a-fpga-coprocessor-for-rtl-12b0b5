// tb_fp32_mul: checks fp32_mul against double precision reference products
// on directed special cases and 20000 random operand pairs.
module tb_fp32_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z; #1;
    exp_y = ref_mul(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, z, y, exp_y);
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
    check(32'h3F80_0000, 32'h4000_0000);  // 1 * 2
    check(32'h3FC0_0000, 32'hBFC0_0000);  // 1.5 * -1.5
    check(32'h0000_0000, 32'h4000_0000);  // 0 * 2
    check(32'h8000_0000, 32'h4000_0000);  // -0 * 2
    check(32'h7F80_0000, 32'h4000_0000);  // inf * 2
    check(32'h7F80_0000, 32'h0000_0000);  // inf * 0 -> NaN
    check(32'h7FC0_0001, 32'h3F80_0000);  // NaN
    check(32'h7F00_0000, 32'h7F00_0000);  // overflow
    check(32'h0080_0000, 32'h0080_0000);  // underflow
    check(32'h0000_0001, 32'h3F80_0000);  // subnormal read as zero
    check(32'h3F80_0001, 32'h3F7F_FFFF);  // rounding near 1
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);  // carry out of rounding
    for (int i = 0; i < 20000; i++)
      check(rand_f(64, 190), rand_f(64, 190));
    for (int i = 0; i < 2000; i++)
      check(rand_f(1, 254), rand_f(1, 254));  // edges of the range
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
