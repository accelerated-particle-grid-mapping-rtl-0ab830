// tb_arith_unit: feeds random weights in [0,1) and random charges into one
// arithmetic unit, one set per cycle with gaps. Checks that the contribution
// (phi_a*phi_b)*(phi_c*q), rounded after every product as the unit does,
// matches bit for bit and arrives exactly AU_LAT cycles later, and that the
// accumulate output equals contribution + data_out for a random grid value
// presented in the same cycle.
module tb_arith_unit;
  import pgm_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  fp32_t phi_a = '0, phi_b = '0, phi_c = '0, q = '0, data_out = '0;
  logic contrib_valid;
  fp32_t contrib, data_in;
  int checks = 0, failures = 0;
  longint cycle = 0;

  arith_unit dut (.clk, .rst_n, .in_valid, .phi_a, .phi_b, .phi_c, .q,
                  .contrib_valid, .contrib, .data_out, .data_in);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t  q_exp  [$];
  longint q_time [$];

  function automatic fp32_t rand_weight();
    return real_to_fp32(real'($urandom % 1000000) / 1000000.0);
  endfunction

  // Present a grid value with every cycle and check the results.
  always @(negedge clk) data_out <= rand_fp32(110, 135);

  always @(posedge clk) begin
    if (rst_n && contrib_valid) begin
      fp32_t e, s;
      longint t;
      if (q_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected contribution");
      end else begin
        e = q_exp.pop_front();
        t = q_time.pop_front();
        checks += 3;
        if (cycle - t != AU_LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
        if (contrib !== e) begin
          failures++;
          if (failures < 10) $display("FAIL contrib %h expected %h", contrib, e);
        end
        s = real_to_fp32(fp32_to_real(e) + fp32_to_real(data_out));
        if (ulp_diff(data_in, s) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL data_in %h expected %h", data_in, s);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk);
      phi_a <= rand_weight();
      phi_b <= rand_weight();
      phi_c <= rand_weight();
      q     <= rand_fp32(120, 130);
      in_valid <= ($urandom % 5 != 0);
      #1;
      if (in_valid) begin
        q_exp.push_back(real_to_fp32(fp32_to_real(real_to_fp32(fp32_to_real(phi_a) * fp32_to_real(phi_b)))
                                   * fp32_to_real(real_to_fp32(fp32_to_real(phi_c) * fp32_to_real(q)))));
        q_time.push_back(cycle);
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (AU_LAT + 3) @(posedge clk);
    checks++;
    if (q_exp.size() != 0) begin
      failures++;
      $display("FAIL %0d contributions missing", q_exp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
