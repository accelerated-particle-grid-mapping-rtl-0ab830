// grid_bank: one bank of the interleaved charge-grid memory.
//
// The 32x32x32 single-precision charge grid is split over 64 such banks; this
// one holds DEPTH words. It is a simple dual-port RAM (one read port, one write
// port, as the block RAMs of the design: Read_address/Data_out and
// Write_address/Data_in). Reads are synchronous: rdata is valid one cycle after
// raddr. Because the pipeline reads a grid point, adds to it and writes it back
// in consecutive cycles, a read and a write of the same address can fall on the
// same clock edge when two particles in a row share a support point; the bank
// then returns the value being written (write-first bypass), which is this
// design's choice for keeping one particle per clock without stalls.
module grid_bank
  import pgm_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (we && waddr == raddr) rdata <= wdata;
    else                      rdata <= mem[raddr];
  end

endmodule
