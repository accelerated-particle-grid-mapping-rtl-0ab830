// tb_grid_bank: random reads and writes against a reference array, including
// reads of the address being written on the same edge, which must return the
// new value (write-first bypass); read data is checked one cycle after the
// address, as the bank's synchronous read port delivers it.
module tb_grid_bank;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned W     = 32;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [W-1:0]  rdata, wdata = '0;
  logic          we = 1'b0;
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0, bypasses = 0;

  grid_bank #(.DEPTH(DEPTH), .W(W)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expd;
    logic         chk;
    // Fill every word.
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    chk = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata !== expd) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h expected %h", rdata, expd);
        end
      end
      raddr = AW'($urandom);
      we    = ($urandom % 2) == 0;
      waddr = (($urandom % 4) == 0) ? raddr : AW'($urandom);
      wdata = $urandom;
      expd  = (we && waddr == raddr) ? wdata : model[raddr];
      if (we && waddr == raddr) bypasses++;
      if (we) model[waddr] = wdata;
      chk = 1'b1;
    end
    @(negedge clk);
    checks++;
    if (rdata !== expd) failures++;
    checks++;
    if (bypasses == 0) begin
      failures++;
      $display("FAIL no same-address read and write happened");
    end
    $display("bypass cases: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
