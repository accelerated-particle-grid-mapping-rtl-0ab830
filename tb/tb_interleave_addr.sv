// tb_interleave_addr: for every cell of a 32^3 grid, computes independently the
// 64 wrapped support points (cell-1 .. cell+2 in each dimension), their bank
// (coordinates mod 4) and address (coordinates div 4), and checks that the
// block's three tables agree: bank_addr of the point's bank, bank_au naming the
// unit, au_bank naming the bank. This also shows that no two units share a bank.
module tb_interleave_addr;
  import pgm_pkg::*;

  localparam int unsigned GRID_N  = 32;
  localparam int unsigned INT_W   = $clog2(GRID_N);
  localparam int unsigned G       = GRID_N / 4;
  localparam int unsigned BANK_AW = $clog2(GRID_N * GRID_N * GRID_N / NUM_BANKS);

  logic [INT_W-1:0] ix, iy, iz;
  logic [BANK_AW-1:0]   bank_addr [NUM_BANKS];
  logic [BANK_SELW-1:0] bank_au   [NUM_BANKS];
  logic [BANK_SELW-1:0] au_bank   [NUM_BANKS];
  int checks = 0, failures = 0, wraps = 0;
  logic clk = 1'b0;

  interleave_addr #(.GRID_N(GRID_N)) dut (.ix, .iy, .iz, .bank_addr, .bank_au, .au_bank);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cz = 0; cz < int'(GRID_N); cz++)
      for (int cy = 0; cy < int'(GRID_N); cy++)
        for (int cx = 0; cx < int'(GRID_N); cx++) begin
          ix = INT_W'(cx); iy = INT_W'(cy); iz = INT_W'(cz);
          #1;
          for (int a = 0; a < int'(NUM_BANKS); a++) begin
            int px, py, pz, b, adr;
            px = (cx - 1 + (a % 4) + int'(GRID_N)) % int'(GRID_N);
            py = (cy - 1 + ((a / 4) % 4) + int'(GRID_N)) % int'(GRID_N);
            pz = (cz - 1 + (a / 16) + int'(GRID_N)) % int'(GRID_N);
            if (px != cx - 1 + (a % 4)) wraps++;
            b   = (px % 4) + 4 * (py % 4) + 16 * (pz % 4);
            adr = (px / 4) + int'(G) * (py / 4) + int'(G * G) * (pz / 4);
            checks++;
            if (int'(au_bank[a]) != b || int'(bank_au[b]) != a || int'(bank_addr[b]) != adr) begin
              failures++;
              if (failures < 10)
                $display("FAIL cell (%0d,%0d,%0d) unit %0d: bank %0d/%0d unit %0d addr %0d/%0d",
                         cx, cy, cz, a, au_bank[a], b, bank_au[b], bank_addr[b], adr);
            end
          end
        end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
