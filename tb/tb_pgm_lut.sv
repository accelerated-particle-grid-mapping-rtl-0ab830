// tb_pgm_lut: end-to-end test of the charge-mapping pipeline built with the
// table-lookup basis unit (BASIS = BASIS_LUT, 2^14-entry tables) instead of the
// floating-point one. Two systems of 3,000 and 2,000 random particles are mapped
// onto the 32^3 grid, each after a clear, streamed back to back; the tb checks
// one particle accepted per clock and compares the whole grid, read back, with
// a double-precision reference (with 14 fraction bits the table is indexed by
// the full fraction, so the reference is the same as for the direct unit).
module tb_pgm_lut;
  import pgm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned GRID_N  = 32;
  localparam int unsigned FRAC_W  = 14;
  localparam int unsigned INT_W   = $clog2(GRID_N);
  localparam int unsigned COORD_W = INT_W + FRAC_W;
  localparam int unsigned NPTS    = GRID_N * GRID_N * GRID_N;
  localparam real         F_MHZ   = 450.0;   // clock for the rate printout

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [COORD_W-1:0] in_x = '0, in_y = '0, in_z = '0;
  fp32_t in_q = '0;
  logic clr_start = 1'b0, clearing, idle;
  logic rd_valid = 1'b0;
  logic [INT_W-1:0] rd_x = '0, rd_y = '0, rd_z = '0;
  logic rd_data_valid;
  fp32_t rd_data;

  pgm_top #(.BASIS(BASIS_LUT), .LUT_N(14)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ref_rho [NPTS];
  real ref_abs [NPTS];
  real ref_q   [NPTS];

  function automatic real phi_ref(int k, real o);
    case (k)
      0: return -0.5 * o * o * o + o * o - 0.5 * o;
      1: return 1.5 * o * o * o - 2.5 * o * o + 1.0;
      2: return -1.5 * o * o * o + 2.0 * o * o + 0.5 * o;
      default: return 0.5 * (o * o * o - o * o);
    endcase
  endfunction

  function automatic void ref_add(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y, logic [COORD_W-1:0] z, fp32_t q);
    int  c [3];
    real w [3][4];
    real qr, v;
    logic [COORD_W-1:0] p [3];
    p = '{x, y, z};
    qr = fp32_to_real(q);
    for (int d = 0; d < 3; d++) begin
      c[d] = int'(p[d] >> FRAC_W);
      for (int k = 0; k < 4; k++) w[d][k] = phi_ref(k, real'(p[d] % (1 << FRAC_W)) / real'(1 << FRAC_W));
    end
    for (int dz = 0; dz < 4; dz++)
      for (int dy = 0; dy < 4; dy++)
        for (int dx = 0; dx < 4; dx++) begin
          int g;
          g = (c[0] - 1 + dx + int'(GRID_N)) % int'(GRID_N)
            + int'(GRID_N) * ((c[1] - 1 + dy + int'(GRID_N)) % int'(GRID_N))
            + int'(GRID_N * GRID_N) * ((c[2] - 1 + dz + int'(GRID_N)) % int'(GRID_N));
          v = qr * w[0][dx] * w[1][dy] * w[2][dz];
          ref_rho[g] += v;
          ref_abs[g] += (v < 0.0) ? -v : v;
          ref_q[g]   += (qr < 0.0) ? -qr : qr;
        end
  endfunction

  task automatic run_system(string name, int n);
    int cyc, sent, bad;
    real hw, e, tol, r;
    // Clear.
    for (int g = 0; g < int'(NPTS); g++) begin
      ref_rho[g] = 0.0; ref_abs[g] = 0.0; ref_q[g] = 0.0;
    end
    @(negedge clk);
    clr_start = 1'b1;
    @(negedge clk);
    clr_start = 1'b0;
    while (clearing) @(negedge clk);
    // Stream all particles back to back.
    sent = 0; cyc = 0;
    while (sent < n) begin
      in_valid = 1'b1;
      in_x = COORD_W'($urandom);
      in_y = COORD_W'($urandom);
      in_z = COORD_W'($urandom);
      r    = 0.05 + real'($urandom % 100000) / 50000.0;
      in_q = real_to_fp32(($urandom % 2) ? -r : r);
      if (in_ready) begin
        ref_add(in_x, in_y, in_z, in_q);
        sent++;
      end
      @(negedge clk);
      cyc++;
    end
    in_valid = 1'b0;
    checks++;
    if (cyc != n) begin
      failures++;
      $display("FAIL %s: %0d particles took %0d cycles", name, n, cyc);
    end
    while (!idle) begin
      @(negedge clk);
      cyc++;
    end
    $display("%s: %0d particles mapped in %0d cycles including pipeline drain; %0.1f particles/us at %0.0f MHz",
             name, n, cyc, real'(n) * F_MHZ / real'(cyc), F_MHZ);
    // Read back and compare.
    bad = 0;
    for (int g = 0; g <= int'(NPTS); g++) begin
      if (g > 0) begin
        checks++;
        hw  = fp32_to_real(rd_data);
        e   = hw - ref_rho[g-1];
        tol = 2.0e-6 * ref_abs[g-1] + 4.0e-6 * ref_q[g-1] + 1.0e-30;
        if (!rd_data_valid || e > tol || e < -tol) begin
          failures++;
          bad++;
          if (bad < 8) $display("FAIL %s grid %0d: got %g expected %g", name, g-1, hw, ref_rho[g-1]);
        end
      end
      if (g < int'(NPTS)) begin
        rd_valid = 1'b1;
        rd_x = INT_W'(g % int'(GRID_N));
        rd_y = INT_W'((g / int'(GRID_N)) % int'(GRID_N));
        rd_z = INT_W'(g / int'(GRID_N * GRID_N));
      end else begin
        rd_valid = 1'b0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run_system("3000 particles", 3000);
    run_system("2000 particles", 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
