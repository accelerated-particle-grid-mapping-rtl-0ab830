// interleave_addr: bank addressing of the interleaved charge-grid memory.
//
// A particle in cell (ix,iy,iz) touches the 4x4x4 grid points
// (ix-1+dx, iy-1+dy, iz-1+dz), dx,dy,dz in 0..3, taken modulo GRID_N in each
// dimension (periodic boundary: points past an edge wrap around). Grid point
// (gx,gy,gz) is stored in bank (gx mod 4) + 4(gy mod 4) + 16(gz mod 4) at
// address (gx div 4) + G(gy div 4) + G^2(gz div 4), G = GRID_N/4. Any four
// consecutive indices have four different residues mod 4, so the 64 support
// points of a particle always fall into 64 different banks and can all be read
// and written in one cycle. That the bank and address depend on all integer bits
// follows the design; this particular mod-4/div-4 split is this design's choice.
// Arithmetic unit a = dx + 4dy + 16dz handles support point (dx,dy,dz).
// Outputs, all combinational from the integer coordinates:
//   bank_addr[b] address of the support point held by bank b,
//   bank_au[b]   arithmetic unit whose point is in bank b (write-side mux select),
//   au_bank[a]   bank holding arithmetic unit a's point (read-side mux select).
module interleave_addr
  import pgm_pkg::*;
#(
  parameter int unsigned GRID_N = 32,
  localparam int unsigned INT_W   = $clog2(GRID_N),
  localparam int unsigned BANK_AW = $clog2(GRID_N * GRID_N * GRID_N / NUM_BANKS)
) (
  input  logic [INT_W-1:0]   ix,
  input  logic [INT_W-1:0]   iy,
  input  logic [INT_W-1:0]   iz,
  output logic [BANK_AW-1:0] bank_addr [NUM_BANKS],
  output logic [BANK_SELW-1:0] bank_au [NUM_BANKS],
  output logic [BANK_SELW-1:0] au_bank [NUM_BANKS]
);


  if (GRID_N % SUPPORT != 0 || GRID_N < 8 || (1 << INT_W) != GRID_N) begin : g_bad_size
    $error("interleave_addr: GRID_N must be a power of two and at least 8");
  end

  always_comb begin
    logic [INT_W-1:0] bx0, by0, bz0;   // first support point (cell index - 1)
    logic [1:0] dx, dy, dz;
    logic [INT_W-1:0] gx, gy, gz;
    bx0 = ix - INT_W'(1);
    by0 = iy - INT_W'(1);
    bz0 = iz - INT_W'(1);
    for (int b = 0; b < int'(NUM_BANKS); b++) begin
      // Offset of the support point whose residues are this bank's.
      dx = 2'(b)      - bx0[1:0];
      dy = 2'(b >> 2) - by0[1:0];
      dz = 2'(b >> 4) - bz0[1:0];
      gx = bx0 + INT_W'(dx);
      gy = by0 + INT_W'(dy);
      gz = bz0 + INT_W'(dz);
      bank_addr[b] = BANK_AW'({gz[INT_W-1:2], gy[INT_W-1:2], gx[INT_W-1:2]});
      bank_au[b]   = {dz, dy, dx};
    end
    for (int a = 0; a < int'(NUM_BANKS); a++) begin
      dx = 2'(bx0[1:0] + 2'(a));
      dy = 2'(by0[1:0] + 2'(a >> 2));
      dz = 2'(bz0[1:0] + 2'(a >> 4));
      au_bank[a] = {dz, dy, dx};
    end
  end

endmodule
