// tb_fp_mul: checks the single-precision multiplier against the exactly
// rounded product computed in double precision, on random operands spanning
// many exponents, on zeros, and on operand pairs whose product rounds up
// across a power of two.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_mul dut (.a, .b, .y);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = real_to_fp32(fp32_to_real(x) * fp32_to_real(z));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    // Simple values.
    check(32'h3F80_0000, 32'h3F80_0000);   // 1*1
    check(32'h3FC0_0000, 32'hC020_0000);   // 1.5*-2.5
    check(32'h0000_0000, 32'h4120_0000);   // 0*10
    check(32'h3F00_0000, 32'h8000_0000);   // 0.5*-0
    check(32'h3F7F_FFFF, 32'h3F80_0001);   // rounds to 1.0
    for (int i = 0; i < 20000; i++) check(rand_fp32(64, 190), rand_fp32(64, 190));
    // Mantissas close to all-ones: exercise the rounding carry.
    for (int i = 0; i < 2000; i++)
      check({1'b0, 8'd127, 23'h7FFF00 | 23'($urandom % 256)}, {1'b0, 8'd126, 23'h7FFF00 | 23'($urandom % 256)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
