// tb_align_mux: random data and random per-output selects; every output must
// carry the input its select names. Also checks the identity and a rotation,
// the patterns a fixed-offset alignment produces.
module tb_align_mux;
  localparam int unsigned N  = 64;
  localparam int unsigned W  = 32;
  localparam int unsigned SW = $clog2(N);

  logic [W-1:0]  din  [N];
  logic [SW-1:0] sel  [N];
  logic [W-1:0]  dout [N];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  align_mux #(.N(N), .W(W)) dut (.din, .sel, .dout);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (dout[k] !== din[sel[k]]) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d sel %0d got %h expected %h", k, sel[k], dout[k], din[sel[k]]);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < int'(N); k++) begin
        din[k] = $urandom;
        case (t % 3)
          0: sel[k] = SW'(k);
          1: sel[k] = SW'(k + t);
          default: sel[k] = SW'($urandom);
        endcase
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
