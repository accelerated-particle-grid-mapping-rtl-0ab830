// tb_basis_lut: reads every entry of the weight table (2^14 fractions, in a
// stream with idle gaps) and compares the four weights bit for bit with the
// polynomials evaluated exactly in double precision and rounded to single;
// checks the one-cycle latency and that the four weights sum to one.
module tb_basis_lut;
  import pgm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned FRAC_W = 14;
  localparam int unsigned LUT_N  = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [FRAC_W-1:0] frac = '0;
  logic out_valid;
  fp32_t phi [SUPPORT];
  int checks = 0, failures = 0;
  longint cycle = 0;

  basis_lut #(.FRAC_W(FRAC_W), .LUT_N(LUT_N)) dut (.clk, .rst_n, .in_valid, .frac, .out_valid, .phi);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FRAC_W-1:0] q_frac [$];
  longint            q_time [$];

  // Exact in double: numerators stay below 2^53.
  function automatic real phi_exact(int k, int i);
    real x, d;
    x = real'(i);
    d = real'(1 << LUT_N);
    case (k)
      0: return (-x * x * x + 2.0 * x * x * d - x * d * d) / (2.0 * d * d * d);
      1: return (3.0 * x * x * x - 5.0 * x * x * d + 2.0 * d * d * d) / (2.0 * d * d * d);
      2: return (-3.0 * x * x * x + 4.0 * x * x * d + x * d * d) / (2.0 * d * d * d);
      default: return (x * x * x - x * x * d) / (2.0 * d * d * d);
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [FRAC_W-1:0] f;
      longint t;
      real sum;
      if (q_frac.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        f = q_frac.pop_front();
        t = q_time.pop_front();
        checks++;
        if (cycle - t != LUT_LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
        sum = 0.0;
        for (int k = 0; k < 4; k++) begin
          fp32_t e;
          e = real_to_fp32(phi_exact(k, int'(f >> (FRAC_W - LUT_N))));
          sum += fp32_to_real(phi[k]);
          checks++;
          if (phi[k] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL entry %0d phi%0d = %h, expected %h", f, k, phi[k], e);
          end
        end
        checks++;
        if (sum - 1.0 > 1.0e-6 || sum - 1.0 < -1.0e-6) begin
          failures++;
          $display("FAIL entry %0d weights sum to %g", f, sum);
        end
      end
    end
  end

  initial begin
    int i;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    i = 0;
    while (i < (1 << FRAC_W)) begin
      @(posedge clk);
      in_valid <= (i < 10) || ($urandom % 8 != 0);
      frac     <= FRAC_W'(i);
      #1;
      if (in_valid) begin
        q_frac.push_back(frac);
        q_time.push_back(cycle);
        i++;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (LUT_LAT + 3) @(posedge clk);
    checks++;
    if (q_frac.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_frac.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
