// Self-checking test of coeff_integrator. A negating instance (MU = 10,
// MU_REF = 16) and a non-negating one (MU = 2, MU_REF = 0, so it reaches
// saturation quickly) get random errors in {-2, 0, 2} with random enables;
// both are compared every cycle with a reference accumulator, including
// clamping at the ends of the coefficient range.
module tb_coeff_integrator;
  import adc_cal_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  err_t  err = '0;
  coef_t a_n, a_p;
  int checks = 0, failures = 0;

  coeff_integrator #(.MU(10), .MU_REF(16), .NEGATE(1'b1), .INIT(to_coef(0.125))) dut_n (
    .clk, .rst_n, .en, .err, .alpha(a_n));
  coeff_integrator #(.MU(2), .MU_REF(0), .NEGATE(1'b0), .INIT(to_coef(1.5))) dut_p (
    .clk, .rst_n, .en, .err, .alpha(a_p));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ref_n, ref_p, lo, hi;
  int n_sat = 0;

  initial begin
    lo = -(longint'(1) << (CW - 1));
    hi = (longint'(1) << (CW - 1)) - 1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    ref_n = longint'(to_coef(0.125));
    ref_p = longint'(to_coef(1.5));
    for (int t = 0; t < 4000; t++) begin
      int e;
      @(negedge clk);
      checks += 2;
      if (longint'(a_n) != ref_n) begin failures++; $display("FAIL negating t=%0d got %0d exp %0d", t, a_n, ref_n); end
      if (longint'(a_p) != ref_p) begin failures++; $display("FAIL positive t=%0d got %0d exp %0d", t, a_p, ref_p); end
      e   = 2 * $urandom_range(0, 2) - 2;
      // bias the second half so the positive instance hits both rails
      if (t > 1000 && t < 2000) e = 2;
      if (t >= 2000 && t < 3500) e = -2;
      en  = ($urandom_range(0, 3) != 0);
      err = err_t'(e);
      if (en) begin
        ref_n = ref_n - longint'(e) * (longint'(1) << (CFRAC - 26));
        ref_p = ref_p + longint'(e) * (longint'(1) << (CFRAC - 2));
        if (ref_p > hi) begin ref_p = hi; n_sat++; end
        if (ref_p < lo) begin ref_p = lo; n_sat++; end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
