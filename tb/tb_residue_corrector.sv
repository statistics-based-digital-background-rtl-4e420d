// Self-checking test of residue_corrector. Random D_o in [-1, 1] and random
// coefficients are applied every cycle; one cycle later d_res must equal
// alpha1*D_o + alpha3*D_o^3 (real arithmetic, tolerance 2^-18) for the cubic
// instance and alpha1*D_o for the gain-only one. Also checks saturation.
module tb_residue_corrector;
  import adc_cal_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  sample_t d_o;
  coef_t   a1, a3;
  sample_t r3, r1;
  int checks = 0, failures = 0;

  residue_corrector #(.CUBIC(1'b1)) dut3 (.clk, .rst_n, .en(1'b1), .d_o, .alpha1(a1), .alpha3(a3), .d_res(r3));
  residue_corrector #(.CUBIC(1'b0)) dut1 (.clk, .rst_n, .en(1'b1), .d_o, .alpha1(a1), .alpha3(a3), .d_res(r1));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom) / 4294967295.0;
  endfunction

  real x, c1, c3, e3, e1;

  initial begin
    d_o = '0; a1 = '0; a3 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      x  = urand(-1.0, 1.0);
      c1 = urand(0.05, 0.3);
      c3 = urand(-0.05, 0.05);
      d_o = to_sample(x);
      a1  = to_coef(c1);
      a3  = to_coef(c3);
      x  = sample_to_real(d_o);
      c1 = coef_to_real(a1);
      c3 = coef_to_real(a3);
      e3 = c1 * x + c3 * x * x * x;
      e1 = c1 * x;
      @(negedge clk);
      checks += 2;
      if (fabs(sample_to_real(r3) - e3) > 1.0 / 262144.0) begin
        failures++;
        $display("FAIL cubic x=%f a1=%f a3=%f got %f exp %f", x, c1, c3, sample_to_real(r3), e3);
      end
      if (fabs(sample_to_real(r1) - e1) > 1.0 / 262144.0) begin
        failures++;
        $display("FAIL linear x=%f got %f exp %f", x, sample_to_real(r1), e1);
      end
    end
    // saturation: 1.9 * 7.9 exceeds the sample range
    @(negedge clk);
    d_o = to_sample(7.9); a1 = to_coef(1.9); a3 = '0;
    @(negedge clk);
    checks++;
    if (r3 != sample_t'({1'b0, {(DW-1){1'b1}}})) begin failures++; $display("FAIL positive saturation"); end
    d_o = to_sample(-7.9);
    @(negedge clk);
    checks++;
    if (r3 != sample_t'({1'b1, {(DW-1){1'b0}}})) begin failures++; $display("FAIL negative saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
