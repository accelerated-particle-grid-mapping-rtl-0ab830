// tb_fp_add: checks the single-precision adder against the sum computed in
// double precision and rounded to single. For exponent differences up to 28 the
// double sum is exact, so the result must match bit for bit; for larger
// differences the reference itself may be off by double rounding and one unit in
// the last place is allowed. Covers same and opposite signs, cancellation of
// nearly equal operands, zeros and carries into a new exponent.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_add dut (.a, .b, .y);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] exp_y;
    int          d;
    a = x; b = z;
    #1;
    exp_y = real_to_fp32(fp32_to_real(x) + fp32_to_real(z));
    d = int'(x[30:23]) - int'(z[30:23]);
    if (d < 0) d = -d;
    checks++;
    if ((d <= 28 || x[30:23] == 0 || z[30:23] == 0) ? (y !== exp_y) : (ulp_diff(y, exp_y) > 1)) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'h3F80_0000, 32'h3F80_0000);   // 1+1
    check(32'h3F80_0000, 32'hBF80_0000);   // 1-1 = +0
    check(32'h0000_0000, 32'hC020_0000);   // 0+(-2.5)
    check(32'h3F7F_FFFF, 32'h3380_0000);   // carry to 1.0
    check(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1: tie, to even
    for (int i = 0; i < 20000; i++) check(rand_fp32(100, 140), rand_fp32(100, 140));
    // Close exponents, opposite signs: cancellation.
    for (int i = 0; i < 5000; i++) begin
      r = rand_fp32(120, 130);
      check(r, {~r[31], r[30:23], 23'(r[22:0] + 23'($urandom % 64) - 23'd32)});
    end
    for (int i = 0; i < 5000; i++) begin
      r = rand_fp32(120, 130);
      check(r, {~r[31], 8'(r[30:23] - 8'd1), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
