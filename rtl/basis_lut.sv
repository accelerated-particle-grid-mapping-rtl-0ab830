// basis_lut: table-lookup evaluation of the cubic interpolation weights.
//
// The alternative to basis_eval: instead of evaluating the four polynomials
// phi_0..phi_3 (see basis_eval) with floating-point arithmetic, the top LUT_N
// bits of the fractional coordinate address a table of 2^LUT_N entries, each
// holding the four single-precision weights for oi = k / 2^LUT_N. Fractions
// finer than LUT_N bits are truncated. The table size n = 14 follows the design;
// how the table is filled is this design's own: at elaboration every weight is
// computed exactly as an integer numerator over 2^(3*LUT_N+1) and rounded to
// single precision (nearest, ties to even), so the table is the correctly
// rounded weight and needs no data file. Interface as basis_eval; the table is
// a synchronous ROM, so out_valid/phi follow in_valid/frac by LUT_LAT = 1 cycle.
// Filling 2^14 entries at elaboration takes a few million constant-evaluation
// steps; a synthesis front end with a low step limit needs that limit raised
// (or a smaller LUT_N) to elaborate this module.
module basis_lut
  import pgm_pkg::*;
#(
  parameter int unsigned FRAC_W = 14,
  parameter int unsigned LUT_N  = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [FRAC_W-1:0] frac,
  output logic              out_valid,
  output fp32_t             phi [SUPPORT]
);

  if (LUT_N > FRAC_W || LUT_N > 20) begin : g_bad_size
    $error("basis_lut: LUT_N must not exceed FRAC_W or 20");
  end

  // Round num / 2^sh (num signed, |num| < 2^62) to single precision.
  function automatic fp32_t ratio_to_fp32(longint num, int sh);
    logic        s;
    logic [63:0] mag, kept, rest, half;
    int          p, e, drop;
    logic [24:0] m;
    s   = num < 0;
    mag = s ? 64'(-num) : 64'(num);
    if (mag == 64'd0) return FP_ZERO;
    p = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) p = i;
    e = p - sh + 127;
    if (p > 23) begin
      drop = p - 23;
      kept = mag >> drop;
      rest = mag & ((64'd1 << drop) - 64'd1);
      half = 64'd1 << (drop - 1);
      m    = 25'(kept);
      if (rest > half || (rest == half && m[0])) m = m + 25'd1;
      if (m[24]) begin
        m = m >> 1;
        e = e + 1;
      end
    end else begin
      m = 25'(mag << (23 - p));
    end
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // Weight k (0..3) at oi = i / 2^LUT_N, as numerator over 2^(3*LUT_N+1).
  function automatic longint phi_num(int k, longint i);
    longint d;
    d = longint'(1) << LUT_N;
    case (k)
      0: return -i * i * i + 2 * i * i * d - i * d * d;
      1: return 3 * i * i * i - 5 * i * i * d + 2 * d * d * d;
      2: return -3 * i * i * i + 4 * i * i * d + i * d * d;
      default: return i * i * i - i * i * d;
    endcase
  endfunction

  logic [4*32-1:0] rom [2**LUT_N];

  initial begin
    for (int i = 0; i < 2**LUT_N; i++)
      for (int k = 0; k < int'(SUPPORT); k++)
        rom[i][32*k +: 32] = ratio_to_fp32(phi_num(k, longint'(i)), 3 * LUT_N + 1);
  end

  logic [4*32-1:0] word;
  logic [LUT_N-1:0] idx;
  assign idx = frac[FRAC_W-1 -: LUT_N];

  always_ff @(posedge clk) begin
    word <= rom[idx];
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_comb begin
    for (int k = 0; k < int'(SUPPORT); k++) phi[k] = word[32*k +: 32];
  end

endmodule
