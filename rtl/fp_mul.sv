// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// Used for every product in the charge-mapping pipeline (basis polynomials and
// the phi_x*phi_y*phi_z*Q contribution), standing in for the hard floating-point
// multipliers of the FPGA the design was built for. The 24x24-bit significand
// product is normalised by at most one place and rounded to nearest, ties to
// even. Simplifications, chosen for this design because its operands are
// weights in [0,1], charges and grid sums: subnormal inputs are read as zero and
// subnormal results are flushed to signed zero; an exponent overflow gives a
// signed infinity; NaN and infinity inputs are not treated specially.
// Interface: y = a * b, no clock, no latency.
module fp_mul
  import pgm_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [23:0] mant;       // significand with hidden bit, before rounding
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;     // after rounding, one extra bit for carry-out
  logic signed [10:0] exp_n;

  always_comb begin
    sa = a[31];
    sb = b[31];
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    sy = sa ^ sb;
    prod = ma * mb;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_n  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd126;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      exp_n  = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      exp_n = exp_n + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || exp_n <= 0) begin
      y = {sy, 31'd0};
    end else if (exp_n >= 11'sd255) begin
      y = {sy, 8'hFF, 23'd0};
    end else begin
      // On carry-out the rounded significand is exactly 1.0, so its fraction is 0.
      y = {sy, exp_n[7:0], mant_r[24] ? 23'd0 : mant_r[22:0]};
    end
  end

endmodule
