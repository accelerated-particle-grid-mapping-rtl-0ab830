// basis_eval: direct floating-point evaluation of the cubic interpolation weights.
//
// A particle at fractional position oi inside its grid cell (0 <= oi < 1)
// contributes to the four nearest grid points of each dimension, at offsets
// -1, 0, +1, +2 from its cell index, with the weights
//   phi_0 = -1/2 oi^3 +      oi^2 - 1/2 oi
//   phi_1 =  3/2 oi^3 - 5/2  oi^2        + 1
//   phi_2 = -3/2 oi^3 +    2 oi^2 + 1/2 oi
//   phi_3 =  1/2 oi^3 - 1/2  oi^2
// (the third-order, C1-continuous basis function of the method; the four sum to 1).
// The polynomials and single precision follow the design; the schedule is this
// design's own: the FRAC_W-bit fraction is converted exactly to single precision,
// then oi^2 and oi^3 are formed, each term c*oi^k is one multiplication by a
// constant, and the three terms of each weight are added in two adder stages.
// Fully pipelined, one fraction per clock. Timing: out_valid/phi appear
// BASIS_LAT = 6 cycles after the in_valid/frac that produced them.
module basis_eval
  import pgm_pkg::*;
#(
  parameter int unsigned FRAC_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FRAC_W-1:0] frac,
  output logic              out_valid,
  output fp32_t             phi [SUPPORT]
);

  // ---- fixed point to float (exact for FRAC_W <= 24) ----
  fp32_t oi_c;
  always_comb begin
    int unsigned p;
    logic found;
    logic [FRAC_W-1:0] m;
    p     = 0;
    found = 1'b0;
    for (int i = FRAC_W - 1; i >= 0; i--) begin
      if (!found && frac[i]) begin
        found = 1'b1;
        p     = i;
      end
    end
    // frac = 2^(p-FRAC_W) * 1.m ; shift the leading one out of the top.
    m = frac << (FRAC_W - p);
    if (!found) begin
      oi_c = FP_ZERO;
    end else begin
      oi_c = {1'b0, 8'(127 + p - FRAC_W), 23'(({m, 23'd0}) >> FRAC_W)};
    end
  end

  logic [BASIS_LAT-1:0] v;
  fp32_t s1_oi;
  fp32_t s2_oi, s2_oi2;
  fp32_t s3_oi, s3_oi2, s3_oi3;
  fp32_t s4_t [SUPPORT][3];
  fp32_t s5_s [SUPPORT];
  fp32_t s5_c [SUPPORT];

  fp32_t oi2_c, oi3_c;
  fp32_t t_c [SUPPORT][3];
  fp32_t s_c [SUPPORT];
  fp32_t phi_c [SUPPORT];

  fp_mul u_sq   (.a(s1_oi),  .b(s1_oi), .y(oi2_c));
  fp_mul u_cube (.a(s2_oi2), .b(s2_oi), .y(oi3_c));

  // Constant multipliers: term 0 = c3*oi^3, term 1 = c2*oi^2, term 2 = c1*oi or c0.
  fp_mul u_t00 (.a(s3_oi3), .b(FP_M_HALF), .y(t_c[0][0]));
  fp_mul u_t01 (.a(s3_oi2), .b(FP_ONE),    .y(t_c[0][1]));
  fp_mul u_t02 (.a(s3_oi),  .b(FP_M_HALF), .y(t_c[0][2]));
  fp_mul u_t10 (.a(s3_oi3), .b(FP_1P5),    .y(t_c[1][0]));
  fp_mul u_t11 (.a(s3_oi2), .b(FP_M_2P5),  .y(t_c[1][1]));
  assign t_c[1][2] = FP_ONE;
  fp_mul u_t20 (.a(s3_oi3), .b(FP_M_1P5),  .y(t_c[2][0]));
  fp_mul u_t21 (.a(s3_oi2), .b(FP_TWO),    .y(t_c[2][1]));
  fp_mul u_t22 (.a(s3_oi),  .b(FP_HALF),   .y(t_c[2][2]));
  fp_mul u_t30 (.a(s3_oi3), .b(FP_HALF),   .y(t_c[3][0]));
  fp_mul u_t31 (.a(s3_oi2), .b(FP_M_HALF), .y(t_c[3][1]));
  assign t_c[3][2] = FP_ZERO;

  for (genvar k = 0; k < SUPPORT; k++) begin : g_sum
    fp_add u_a1 (.a(s4_t[k][0]), .b(s4_t[k][1]), .y(s_c[k]));
    fp_add u_a2 (.a(s5_s[k]),    .b(s5_c[k]),    .y(phi_c[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[BASIS_LAT-2:0], in_valid};
    s1_oi  <= oi_c;
    s2_oi  <= s1_oi;
    s2_oi2 <= oi2_c;
    s3_oi  <= s2_oi;
    s3_oi2 <= s2_oi2;
    s3_oi3 <= oi3_c;
    s4_t   <= t_c;
    s5_s   <= s_c;
    for (int k = 0; k < SUPPORT; k++) s5_c[k] <= s4_t[k][2];
    phi    <= phi_c;
  end

  assign out_valid = v[BASIS_LAT-1];

endmodule
