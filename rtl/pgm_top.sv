// pgm_top: fully pipelined particle-to-grid charge mapping (charge assignment).
//
// Each particle (x, y, z, Q) spreads its charge over the 4x4x4 grid points
// around it: rho(g) += Q * phi(x) * phi(y) * phi(z), with the cubic weights of
// basis_eval. The design accepts one particle per clock and updates all 64 grid
// points of that particle in the same cycle, so it maps particles at the clock
// rate. How it works, following the design it implements:
//   * coordinates are unsigned fixed point in grid units; the integer bits pick
//     the cell, the fraction is the position inside it;
//   * three basis units (x, y, z) turn the fractions into 3x4 weights, either
//     by floating-point evaluation (basis_eval, BASIS = BASIS_DIRECT, the
//     default) or by table lookup (basis_lut, BASIS = BASIS_LUT, LUT_N bits);
//   * 64 arith_unit instances form the 64 contributions phi_x*phi_y*phi_z*Q;
//   * the grid lives in 64 grid_bank RAMs, interleaved so that the 64 support
//     points of any particle sit in 64 different banks (interleave_addr);
//   * two align_mux arrays route bank read data to the units and the units'
//     sums back to the bank write ports; each unit adds its contribution to the
//     value read and it is written back (read-modify-write), the next particle's
//     reads overlapping this one's writes.
// This design's own choices: the grid is periodic (indices wrap modulo GRID_N);
// a read and a write of the same point on the same edge are resolved by a
// write-first bypass in the bank, so back-to-back particles sharing grid points
// never stall; a clear operation zeroes the grid (one word per bank per cycle,
// GRID_N^3/64 cycles) and a read port returns single grid points, in place of
// the FFT units the mapped grid is meant for.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   in_valid/in_ready  particle handshake; in_ready is low only while a clear
//                      is pending or running. in_x/y/z: INT_W integer bits over
//                      FRAC_W fraction bits. in_q: charge, single precision.
//   clr_start          request to zero the grid; it waits for particles in flight.
//   clearing           a clear is pending or running.
//   idle               nothing in flight and no clear pending or running.
//   rd_valid, rd_x/y/z read one grid point; allowed only while idle.
//   rd_data_valid/rd_data the value, one cycle after rd_valid.
// Timing: a particle accepted in cycle t has its grid updates written at the end
// of cycle t + 1 + B_LAT + AU_LAT, i.e. t + 9 with the direct basis (B_LAT = 6)
// and t + 4 with the table (B_LAT = 1); idle rises in the cycle after.
module pgm_top
  import pgm_pkg::*;
#(
  parameter int unsigned GRID_N = 32,
  parameter int unsigned FRAC_W = 14,
  parameter basis_mode_e BASIS  = BASIS_DIRECT,
  parameter int unsigned LUT_N  = 14,
  localparam int unsigned B_LAT   = (BASIS == BASIS_LUT) ? LUT_LAT : BASIS_LAT,
  localparam int unsigned INT_W   = $clog2(GRID_N),
  localparam int unsigned COORD_W = INT_W + FRAC_W,
  localparam int unsigned DEPTH   = GRID_N * GRID_N * GRID_N / NUM_BANKS,
  localparam int unsigned BANK_AW = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // particle stream
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  logic [COORD_W-1:0] in_z,
  input  fp32_t              in_q,
  // grid clear
  input  logic               clr_start,
  output logic               clearing,
  output logic               idle,
  // grid read-out
  input  logic               rd_valid,
  input  logic [INT_W-1:0]   rd_x,
  input  logic [INT_W-1:0]   rd_y,
  input  logic [INT_W-1:0]   rd_z,
  output logic               rd_data_valid,
  output fp32_t              rd_data
);

  typedef logic [INT_W-1:0] idx_t;
  typedef struct packed {
    idx_t  ix, iy, iz;
  } cell_t;

  // ---------------- input register ----------------
  logic              s0_v;
  cell_t             s0_cell;
  logic [FRAC_W-1:0] s0_fx, s0_fy, s0_fz;
  fp32_t             s0_q;

  logic clr_pend, clr_act;
  logic [BANK_AW-1:0] clr_cnt;
  logic in_fire;

  assign in_ready = !(clr_pend || clr_act);
  assign in_fire  = in_valid && in_ready;
  assign clearing = clr_pend || clr_act;

  always_ff @(posedge clk) begin
    if (!rst_n) s0_v <= 1'b0;
    else        s0_v <= in_fire;
    s0_cell <= '{ix: in_x[COORD_W-1:FRAC_W], iy: in_y[COORD_W-1:FRAC_W], iz: in_z[COORD_W-1:FRAC_W]};
    s0_fx   <= in_x[FRAC_W-1:0];
    s0_fy   <= in_y[FRAC_W-1:0];
    s0_fz   <= in_z[FRAC_W-1:0];
    s0_q    <= in_q;
  end

  // ---------------- basis function evaluation ----------------
  fp32_t phi_x [SUPPORT];
  fp32_t phi_y [SUPPORT];
  fp32_t phi_z [SUPPORT];
  logic  bx_v, by_v, bz_v;

  if (BASIS == BASIS_LUT) begin : g_lut
    basis_lut #(.FRAC_W(FRAC_W), .LUT_N(LUT_N)) u_bx (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fx), .out_valid(bx_v), .phi(phi_x));
    basis_lut #(.FRAC_W(FRAC_W), .LUT_N(LUT_N)) u_by (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fy), .out_valid(by_v), .phi(phi_y));
    basis_lut #(.FRAC_W(FRAC_W), .LUT_N(LUT_N)) u_bz (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fz), .out_valid(bz_v), .phi(phi_z));
  end else begin : g_direct
    basis_eval #(.FRAC_W(FRAC_W)) u_bx (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fx), .out_valid(bx_v), .phi(phi_x));
    basis_eval #(.FRAC_W(FRAC_W)) u_by (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fy), .out_valid(by_v), .phi(phi_y));
    basis_eval #(.FRAC_W(FRAC_W)) u_bz (.clk, .rst_n, .in_valid(s0_v), .frac(s0_fz), .out_valid(bz_v), .phi(phi_z));
  end

  // Cell index and charge travel alongside the basis pipeline.
  cell_t d_cell [B_LAT];
  fp32_t d_q    [B_LAT];
  always_ff @(posedge clk) begin
    d_cell[0] <= s0_cell;
    d_q[0]    <= s0_q;
    for (int i = 1; i < int'(B_LAT); i++) begin
      d_cell[i] <= d_cell[i-1];
      d_q[i]    <= d_q[i-1];
    end
  end

  // ---------------- arithmetic units ----------------
  fp32_t au_contrib [NUM_BANKS];
  fp32_t au_rd      [NUM_BANKS];   // grid value routed to each unit
  fp32_t au_wr      [NUM_BANKS];   // updated value from each unit
  logic  au_cv      [NUM_BANKS];

  for (genvar a = 0; a < int'(NUM_BANKS); a++) begin : g_au
    arith_unit u_au (
      .clk, .rst_n,
      .in_valid     (bx_v),
      .phi_a        (phi_x[a % 4]),
      .phi_b        (phi_y[(a / 4) % 4]),
      .phi_c        (phi_z[a / 16]),
      .q            (d_q[B_LAT-1]),
      .contrib_valid(au_cv[a]),
      .contrib      (au_contrib[a]),
      .data_out     (au_rd[a]),
      .data_in      (au_wr[a])
    );
  end

  // ---------------- address generation (read cycle) ----------------
  logic  r_v;          // read of the support issued in this cycle
  cell_t r_cell;
  always_ff @(posedge clk) begin
    if (!rst_n) r_v <= 1'b0;
    else        r_v <= bx_v;
    r_cell <= d_cell[B_LAT-1];
  end

  logic [BANK_AW-1:0]   ia_addr  [NUM_BANKS];
  logic [BANK_SELW-1:0] ia_bk_au [NUM_BANKS];
  logic [BANK_SELW-1:0] ia_au_bk [NUM_BANKS];

  interleave_addr #(.GRID_N(GRID_N)) u_ia (
    .ix(r_cell.ix), .iy(r_cell.iy), .iz(r_cell.iz),
    .bank_addr(ia_addr), .bank_au(ia_bk_au), .au_bank(ia_au_bk)
  );

  // Read-out request: the same bank address in every bank, the bank picked later.
  logic [BANK_AW-1:0]   ro_addr;
  logic [BANK_SELW-1:0] ro_bank;
  assign ro_addr = BANK_AW'({rd_z[INT_W-1:2], rd_y[INT_W-1:2], rd_x[INT_W-1:2]});
  assign ro_bank = {rd_z[1:0], rd_y[1:0], rd_x[1:0]};

  // ---------------- write-back cycle registers ----------------
  logic                 w_v;
  logic [BANK_AW-1:0]   w_addr  [NUM_BANKS];
  logic [BANK_SELW-1:0] w_bk_au [NUM_BANKS];
  logic [BANK_SELW-1:0] w_au_bk [NUM_BANKS];
  logic                 ro_v;
  logic [BANK_SELW-1:0] ro_bank_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_v  <= 1'b0;
      ro_v <= 1'b0;
    end else begin
      w_v  <= r_v;
      ro_v <= rd_valid && !r_v;
    end
    w_addr    <= ia_addr;
    w_bk_au   <= ia_bk_au;
    w_au_bk   <= ia_au_bk;
    ro_bank_q <= ro_bank;
  end

  // ---------------- banks and alignment multiplexers ----------------
  fp32_t              bank_rd [NUM_BANKS];
  fp32_t              bank_wd [NUM_BANKS];
  logic [BANK_SELW-1:0] rd_sel [NUM_BANKS];

  // Read side: bank -> unit. Mux 0 also serves the read-out port.
  always_comb begin
    rd_sel    = w_au_bk;
    if (ro_v) rd_sel[0] = ro_bank_q;
  end
  align_mux #(.N(NUM_BANKS), .W(32)) u_rmux (.din(bank_rd), .sel(rd_sel), .dout(au_rd));

  // Write side: unit -> bank.
  align_mux #(.N(NUM_BANKS), .W(32)) u_wmux (.din(au_wr), .sel(w_bk_au), .dout(bank_wd));

  for (genvar b = 0; b < int'(NUM_BANKS); b++) begin : g_bank
    grid_bank #(.DEPTH(DEPTH), .W(32)) u_bank (
      .clk,
      .raddr(r_v ? ia_addr[b] : ro_addr),
      .rdata(bank_rd[b]),
      .we   (clr_act || w_v),
      .waddr(clr_act ? clr_cnt : w_addr[b]),
      .wdata(clr_act ? FP_ZERO : bank_wd[b])
    );
  end

  assign rd_data_valid = ro_v;
  assign rd_data       = au_rd[0];

  // ---------------- clear sequencing and status ----------------
  logic [B_LAT-1:0] bvp;   // particles inside the basis pipeline
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvp <= '0;
    end else begin
      bvp[0] <= s0_v;
      for (int i = 1; i < int'(B_LAT); i++) bvp[i] <= bvp[i-1];
    end
  end

  logic busy;
  assign busy = s0_v || (|bvp) || r_v || w_v;
  assign idle = !busy && !clr_pend && !clr_act;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_pend <= 1'b0;
      clr_act  <= 1'b0;
      clr_cnt  <= '0;
    end else begin
      if (clr_start && !clr_act) clr_pend <= 1'b1;
      if (clr_pend && !busy) begin
        clr_pend <= 1'b0;
        clr_act  <= 1'b1;
        clr_cnt  <= '0;
      end
      if (clr_act) begin
        clr_cnt <= clr_cnt + 1'b1;
        if (clr_cnt == BANK_AW'(DEPTH - 1)) clr_act <= 1'b0;
      end
    end
  end

  // ---------------- protocol rules ----------------
  // A particle offered but not taken stays offered.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid && !in_ready |=> in_valid);
  // The read-out port is for a grid that is not being updated.
  a_rd_idle: assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> idle);
  // The three basis pipelines run in lock step; units and write-back agree.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (bx_v == by_v) && (bx_v == bz_v) && (au_cv[0] == w_v));

endmodule
