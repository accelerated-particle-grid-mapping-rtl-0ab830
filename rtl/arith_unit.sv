// arith_unit: one of the 64 arithmetic units of the charge-mapping pipeline.
//
// Each unit owns one point (dx,dy,dz) of a particle's 4x4x4 support. It forms
// that point's contribution phi_a*phi_b*phi_c*Q with three single-precision
// multipliers arranged as in the design: phi_a*phi_b and phi_c*Q in parallel,
// then the product of the two; and it adds the contribution to the grid value
// read from RAM, giving the value to write back. Which weight goes on which
// multiplier input is this design's choice (phi_a = x, phi_b = y, phi_c = z).
// Timing: the multipliers are pipelined, contrib/contrib_valid appear
// AU_LAT = 2 cycles after in_valid. The adder is combinational:
// data_in = contrib + data_out in the same cycle, so the caller presents the
// RAM read data in the cycle contrib_valid is high and writes data_in back at
// the end of that cycle (a one-cycle read-modify-write loop).
module arith_unit
  import pgm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t phi_a,
  input  fp32_t phi_b,
  input  fp32_t phi_c,
  input  fp32_t q,
  output logic  contrib_valid,
  output fp32_t contrib,
  input  fp32_t data_out,   // from the grid RAM
  output fp32_t data_in     // to the grid RAM
);

  fp32_t p_ab_c, p_cq_c, p_all_c;
  fp32_t p_ab, p_cq;
  logic  v1;

  fp_mul u_mab  (.a(phi_a), .b(phi_b), .y(p_ab_c));
  fp_mul u_mcq  (.a(phi_c), .b(q),     .y(p_cq_c));
  fp_mul u_mall (.a(p_ab),  .b(p_cq),  .y(p_all_c));
  fp_add u_acc  (.a(contrib), .b(data_out), .y(data_in));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1            <= 1'b0;
      contrib_valid <= 1'b0;
    end else begin
      v1            <= in_valid;
      contrib_valid <= v1;
    end
    p_ab    <= p_ab_c;
    p_cq    <= p_cq_c;
    contrib <= p_all_c;
  end

endmodule
