// fp_add: combinational IEEE-754 single-precision adder.
//
// Used for the basis polynomials and for the accumulate step of each arithmetic
// unit (grid value + contribution). Classic structure: order the operands by
// magnitude, align the smaller significand with guard, round and sticky bits,
// add or subtract, renormalise (one place right after a carry, leading-zero count
// left after a cancellation) and round to nearest, ties to even. Simplifications
// as in fp_mul: subnormals are treated as zero in and flushed out, overflow gives
// infinity, NaN/infinity inputs are not special-cased, and an exact zero result
// is +0. Interface: y = a + b, no clock, no latency.
module fp_add
  import pgm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        a_big;
  fp32_t       op_b, op_s;
  logic [7:0]  eb, es, d;
  logic [26:0] xb, xs, xs_sh;   // {hidden, 23 fraction bits, guard, round, sticky}
  logic        sticky_sh;
  logic [27:0] sum;
  logic [26:0] r;
  logic signed [10:0] exp_n;
  logic [4:0]  lz;
  logic        found;
  logic        round_up;
  logic [24:0] mant_r;

  always_comb begin
    lz    = 5'd0;
    found = 1'b0;
    a_big = (a[30:0] >= b[30:0]);
    op_b   = a_big ? a : b;
    op_s = a_big ? b : a;
    eb = op_b[30:23];
    es = op_s[30:23];
    xb = (eb == 8'd0) ? 27'd0 : {1'b1, op_b[22:0], 3'b000};
    xs = (es == 8'd0) ? 27'd0 : {1'b1, op_s[22:0], 3'b000};
    d  = eb - es;
    if (d >= 8'd27) begin
      xs_sh     = 27'd0;
      sticky_sh = |xs;
    end else begin
      xs_sh     = xs >> d;
      sticky_sh = |(xs & ((27'd1 << d) - 27'd1));
    end
    xs_sh[0] = xs_sh[0] | sticky_sh;

    exp_n = 11'(signed'({3'b000, eb}));
    if (op_b[31] == op_s[31]) sum = {1'b0, xb} + {1'b0, xs_sh};
    else                      sum = {1'b0, xb} - {1'b0, xs_sh};

    // Normalise.
    if (sum[27]) begin
      r     = {sum[27:2], sum[1] | sum[0]};
      exp_n = exp_n + 11'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      r     = sum[26:0] << lz;
      exp_n = exp_n - 11'(lz);
    end

    // Round to nearest, ties to even.
    round_up = r[2] & (r[1] | r[0] | r[3]);
    mant_r   = {1'b0, r[26:3]} + 25'(round_up);
    if (mant_r[24]) exp_n = exp_n + 11'sd1;

    if (sum[26:0] == 27'd0 && !sum[27]) begin
      y = FP_ZERO;
    end else if (eb == 8'd0 || exp_n <= 0) begin
      y = (eb == 8'd0) ? FP_ZERO : {op_b[31], 31'd0};
    end else if (exp_n >= 11'sd255) begin
      y = {op_b[31], 8'hFF, 23'd0};
    end else begin
      y = {op_b[31], exp_n[7:0], mant_r[24] ? 23'd0 : mant_r[22:0]};
    end
  end

endmodule
