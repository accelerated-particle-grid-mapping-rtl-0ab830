// tb_pgm_top: end-to-end test of the charge-mapping pipeline at its default size
// (32^3 grid, 14 fraction bits, 64 arithmetic units and banks).
//
// Phase 1 clears the grid, streams particles (random, clustered in one cell so
// that back-to-back particles update the same grid points, and next to the grid
// edges so that supports wrap around), with random idle gaps, then reads the
// whole grid back and compares it with a double-precision reference of
// rho(g) = sum Q phi(x) phi(y) phi(z) over the particles. Phase 2 requests a
// clear while particles are still in flight and keeps offering a particle while
// the clear holds in_ready low, maps a second set and compares again.
// Single-precision weights carry an absolute error of about 1e-7, so a grid
// value may differ from the reference by a few 1e-6 of the summed |Q| of the
// particles touching it, plus rounding of the sums; the tolerance is set so.
// Also checked: one particle accepted per clock in a gap-free burst, the clear
// taking GRID_N^3/64 cycles, and idle rising a fixed 10 cycles after the last
// particle is accepted. Each mechanism is counted and must occur.
module tb_pgm_top;
  import pgm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned GRID_N  = 32;
  localparam int unsigned FRAC_W  = 14;
  localparam int unsigned INT_W   = $clog2(GRID_N);
  localparam int unsigned COORD_W = INT_W + FRAC_W;
  localparam int unsigned NPTS    = GRID_N * GRID_N * GRID_N;
  localparam int unsigned DEPTH   = NPTS / NUM_BANKS;
  localparam int unsigned N1      = 3000;
  localparam int unsigned N2      = 1500;
  localparam int unsigned MAP_LAT = 10;   // accept edge to idle

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [COORD_W-1:0] in_x = '0, in_y = '0, in_z = '0;
  fp32_t in_q = '0;
  logic clr_start = 1'b0, clearing, idle;
  logic rd_valid = 1'b0;
  logic [INT_W-1:0] rd_x = '0, rd_y = '0, rd_z = '0;
  logic rd_data_valid;
  fp32_t rd_data;

  pgm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_wrap = 0, n_stall = 0, n_clr_wait = 0, n_bubble = 0, n_reads = 0, n_clear = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ref_rho [NPTS];
  real ref_abs [NPTS];
  real ref_q   [NPTS];   // sum of |Q| of the particles touching each point
  int  prev_cell [3];

  function automatic real phi_ref(int k, real o);
    case (k)
      0: return -0.5 * o * o * o + o * o - 0.5 * o;
      1: return 1.5 * o * o * o - 2.5 * o * o + 1.0;
      2: return -1.5 * o * o * o + 2.0 * o * o + 0.5 * o;
      default: return 0.5 * (o * o * o - o * o);
    endcase
  endfunction

  function automatic int cdist(int a, int b);
    int d;
    d = (a - b + int'(GRID_N)) % int'(GRID_N);
    return d > int'(GRID_N) / 2 ? int'(GRID_N) - d : d;
  endfunction

  // Add one accepted particle to the reference grid.
  function automatic void ref_add(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y, logic [COORD_W-1:0] z, fp32_t q, bit back_to_back);
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
    if (c[0] == 0 || c[0] >= int'(GRID_N) - 2 || c[1] == 0 || c[1] >= int'(GRID_N) - 2 ||
        c[2] == 0 || c[2] >= int'(GRID_N) - 2) n_wrap++;
    if (back_to_back && cdist(c[0], prev_cell[0]) <= 3 && cdist(c[1], prev_cell[1]) <= 3 &&
        cdist(c[2], prev_cell[2]) <= 3) n_bypass++;
    prev_cell = c;
    for (int dz = 0; dz < 4; dz++)
      for (int dy = 0; dy < 4; dy++)
        for (int dx = 0; dx < 4; dx++) begin
          int gx, gy, gz, g;
          gx = (c[0] - 1 + dx + int'(GRID_N)) % int'(GRID_N);
          gy = (c[1] - 1 + dy + int'(GRID_N)) % int'(GRID_N);
          gz = (c[2] - 1 + dz + int'(GRID_N)) % int'(GRID_N);
          g  = gx + int'(GRID_N) * (gy + int'(GRID_N) * gz);
          v  = qr * w[0][dx] * w[1][dy] * w[2][dz];
          ref_rho[g] += v;
          ref_abs[g] += (v < 0.0) ? -v : v;
          ref_q[g]   += (qr < 0.0) ? -qr : qr;
        end
  endfunction

  function automatic logic [COORD_W-1:0] rand_coord(int mode, logic [COORD_W-1:0] prev);
    case (mode)
      0: return COORD_W'($urandom);
      1: return {prev[COORD_W-1:FRAC_W], FRAC_W'($urandom)};                  // same cell
      default: return {(($urandom % 2) == 0) ? INT_W'($urandom % 2) : INT_W'(GRID_N - 1 - ($urandom % 2)),
                       FRAC_W'($urandom)};                                    // at an edge
    endcase
  endfunction

  function automatic fp32_t rand_charge();
    real r;
    r = 0.05 + real'($urandom % 100000) / 50000.0;
    return real_to_fp32(($urandom % 2) ? -r : r);
  endfunction

  // Stream n particles; gaps=1 inserts random idle cycles. Inputs change at negedge.
  task automatic stream(int n, bit gaps, output int cycles);
    int sent, mode;
    bit last_fired;
    sent = 0; cycles = 0; last_fired = 0;
    while (sent < n) begin
      @(negedge clk);
      cycles++;
      if (!in_valid || in_ready) begin
        // previous offer (if any) was taken at the last edge; make a new one
        if (gaps && ($urandom % 6) == 0) begin
          in_valid = 1'b0;
          n_bubble++;
        end else begin
          mode = int'($urandom % 8);
          mode = (mode < 4) ? 0 : (mode < 7 ? 1 : 2);
          in_valid = 1'b1;
          in_x = rand_coord(mode, in_x);
          in_y = rand_coord(mode, in_y);
          in_z = rand_coord(mode, in_z);
          in_q = rand_charge();
        end
      end
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        ref_add(in_x, in_y, in_z, in_q, last_fired);
        sent++;
        last_fired = 1;
      end else begin
        last_fired = 0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    while (!idle) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // Read the whole grid and compare with the reference.
  task automatic check_grid(string tag);
    int bad;
    real hw, e, tol;
    bad = 0;
    for (int g = 0; g <= int'(NPTS); g++) begin
      @(negedge clk);
      if (g > 0) begin
        checks++;
        hw  = fp32_to_real(rd_data);
        e   = hw - ref_rho[g-1];
        tol = 2.0e-6 * ref_abs[g-1] + 4.0e-6 * ref_q[g-1] + 1.0e-30;
        if (!rd_data_valid || e > tol || e < -tol) begin
          failures++;
          bad++;
          if (bad < 8) $display("FAIL %s grid %0d: got %g expected %g (valid %0d)", tag, g-1, hw, ref_rho[g-1], rd_data_valid);
        end
      end
      if (g < int'(NPTS)) begin
        rd_valid = 1'b1;
        rd_x = INT_W'(g % int'(GRID_N));
        rd_y = INT_W'((g / int'(GRID_N)) % int'(GRID_N));
        rd_z = INT_W'(g / int'(GRID_N * GRID_N));
        n_reads++;
      end else begin
        rd_valid = 1'b0;
      end
    end
  endtask

  initial begin
    int cyc, lat;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Clear timing: DEPTH cycles of writing.
    @(negedge clk);
    clr_start = 1'b1;
    @(negedge clk);
    clr_start = 1'b0;
    cyc = 0;
    while (clearing) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != int'(DEPTH) + 1) begin
      failures++;
      $display("FAIL clear took %0d cycles, expected %0d", cyc, DEPTH + 1);
    end
    n_clear++;

    // Phase 1a: gap-free burst, one particle per clock.
    stream(500, 1'b0, cyc);
    checks++;
    if (cyc != 500) begin
      failures++;
      $display("FAIL 500 particles took %0d cycles", cyc);
    end
    // Latency to idle from the last accepted particle.
    wait_idle(lat);
    checks++;
    if (lat != int'(MAP_LAT) - 1) begin
      failures++;
      $display("FAIL idle %0d cycles after the last particle, expected %0d", lat + 1, MAP_LAT);
    end
    // Phase 1b: with gaps.
    stream(N1 - 500, 1'b1, cyc);
    wait_idle(cyc);
    check_grid("phase1");

    // Phase 2: clear requested with particles in flight.
    stream(200, 1'b0, cyc);
    @(negedge clk);   // particles of the burst are still in the pipeline
    clr_start = 1'b1;
    if (!idle) n_clr_wait++;
    @(negedge clk);
    clr_start = 1'b0;
    // Offer a particle at once: it must wait for the clear.
    in_valid = 1'b1;
    in_x = rand_coord(0, in_x); in_y = rand_coord(0, in_y); in_z = rand_coord(0, in_z);
    in_q = rand_charge();
    cyc = 0;
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc < int'(DEPTH)) begin
      failures++;
      $display("FAIL particle accepted after %0d cycles, during the clear", cyc);
    end
    n_clear++;
    for (int g = 0; g < int'(NPTS); g++) begin
      ref_rho[g] = 0.0;
      ref_abs[g] = 0.0;
      ref_q[g]   = 0.0;
    end
    ref_add(in_x, in_y, in_z, in_q, 1'b0);
    stream(N2 - 1, 1'b1, cyc);
    wait_idle(cyc);
    check_grid("phase2");

    // Mechanism coverage.
    $display("back-to-back shared points %0d, wrap-around %0d, stall cycles %0d, clear waits %0d, clears %0d, gaps %0d, reads %0d",
             n_bypass, n_wrap, n_stall, n_clr_wait, n_clear, n_bubble, n_reads);
    checks += 7;
    if (n_bypass == 0)   begin failures++; $display("FAIL no bypass case"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no wrap-around case"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no stall"); end
    if (n_clr_wait == 0) begin failures++; $display("FAIL clear never waited"); end
    if (n_clear < 2)     begin failures++; $display("FAIL clear"); end
    if (n_bubble == 0)   begin failures++; $display("FAIL no gaps"); end
    if (n_reads == 0)    begin failures++; $display("FAIL no reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
