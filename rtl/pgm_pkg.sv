// pgm_pkg: shared types and constants of the particle-grid charge-mapping pipeline.
//
// All arithmetic on basis weights, charges and grid values is IEEE-754 single
// precision (fp32_t), as in the design this follows; particle coordinates are
// unsigned fixed point with an integer part that indexes the grid cell and a
// fraction that places the particle inside the cell. The 4x4x4 support of a
// particle is spread over NUM_BANKS = 64 RAM banks so that every support point
// lives in a different bank. Latencies of the pipeline stages are collected here
// so that the top level can align its delay lines to them.
package pgm_pkg;

  typedef logic [31:0] fp32_t;

  // Support of the cubic (order-3) basis function: 4 points per dimension.
  localparam int unsigned SUPPORT   = 4;
  localparam int unsigned NUM_BANKS = SUPPORT * SUPPORT * SUPPORT;  // 64
  localparam int unsigned BANK_SELW = $clog2(NUM_BANKS);            // 6

  // Single-precision constants used by the basis polynomials.
  localparam fp32_t FP_ZERO   = 32'h0000_0000;
  localparam fp32_t FP_ONE    = 32'h3F80_0000;  //  1.0
  localparam fp32_t FP_HALF   = 32'h3F00_0000;  //  0.5
  localparam fp32_t FP_M_HALF = 32'hBF00_0000;  // -0.5
  localparam fp32_t FP_1P5    = 32'h3FC0_0000;  //  1.5
  localparam fp32_t FP_M_1P5  = 32'hBFC0_0000;  // -1.5
  localparam fp32_t FP_TWO    = 32'h4000_0000;  //  2.0
  localparam fp32_t FP_M_2P5  = 32'hC020_0000;  // -2.5

  // How the basis weights are produced: evaluated with floating-point
  // arithmetic (direct) or read from a precomputed table (lut).
  typedef enum logic {BASIS_DIRECT = 1'b0, BASIS_LUT = 1'b1} basis_mode_e;

  // Pipeline latencies (clock cycles from input register to output register).
  localparam int unsigned BASIS_LAT = 6;  // basis_eval
  localparam int unsigned AU_LAT    = 2;  // arith_unit product pipeline
  localparam int unsigned LUT_LAT   = 1;  // basis_lut

endpackage
