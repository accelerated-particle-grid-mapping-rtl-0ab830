// tb_basis_eval: streams random fractions (with idle gaps) through the basis
// evaluator and checks every output weight against the cubic polynomials
// evaluated in double precision, that the four weights sum to one, and that
// each result appears exactly BASIS_LAT cycles after its input.
module tb_basis_eval;
  import pgm_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned FRAC_W = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [FRAC_W-1:0] frac = '0;
  logic out_valid;
  fp32_t phi [SUPPORT];
  int checks = 0, failures = 0;
  longint cycle = 0;

  basis_eval #(.FRAC_W(FRAC_W)) dut (.clk, .rst_n, .in_valid, .frac, .out_valid, .phi);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FRAC_W-1:0] q_frac [$];
  longint            q_time [$];

  function automatic real ref_phi(int k, real o);
    case (k)
      0: return -0.5 * o * o * o + o * o - 0.5 * o;
      1: return 1.5 * o * o * o - 2.5 * o * o + 1.0;
      2: return -1.5 * o * o * o + 2.0 * o * o + 0.5 * o;
      default: return 0.5 * (o * o * o - o * o);
    endcase
  endfunction

  // Check outputs.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [FRAC_W-1:0] f;
      longint t;
      real o, sum, e;
      if (q_frac.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        f = q_frac.pop_front();
        t = q_time.pop_front();
        o = real'(f) / real'(1 << FRAC_W);
        checks++;
        if (cycle - t != BASIS_LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
        sum = 0.0;
        for (int k = 0; k < 4; k++) begin
          e = fp32_to_real(phi[k]) - ref_phi(k, o);
          sum += fp32_to_real(phi[k]);
          checks++;
          if (e > 1.0e-6 || e < -1.0e-6) begin
            failures++;
            if (failures < 10) $display("FAIL frac %0d phi%0d = %g, expected %g", f, k, fp32_to_real(phi[k]), ref_phi(k, o));
          end
        end
        checks++;
        if (sum - 1.0 > 2.0e-6 || sum - 1.0 < -2.0e-6) begin
          failures++;
          $display("FAIL frac %0d weights sum to %g", f, sum);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk);
      if (i < 4)            frac <= FRAC_W'(i == 0 ? 0 : (i == 1 ? 1 : (i == 2 ? (1 << (FRAC_W - 1)) : (1 << FRAC_W) - 1)));
      else                  frac <= FRAC_W'($urandom);
      in_valid <= (i < 10) || ($urandom % 4 != 0);
      #1;
      if (in_valid) begin
        q_frac.push_back(frac);
        q_time.push_back(cycle);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (BASIS_LAT + 3) @(posedge clk);
    checks++;
    if (q_frac.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_frac.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
