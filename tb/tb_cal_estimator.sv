// Closed-loop test of cal_estimator. The testbench models a first stage
// with residue V_res = -(q + PN*Delta/2), q uniform in [-Delta/2, Delta/2],
// an amplifier V_o = 7.76*V_res - 12.8*V_res^3 and an ideal back end, and
// feeds back D_res = alpha1*V_o + alpha3*V_o^3 using the estimator's own
// coefficients. Steps are enlarged (MU_REF = 6) and L = 1000 so the loops
// settle in 3*10^5 samples. Checks: alpha1 -> 1/beta1 (0.5%), alpha3 ->
// -beta3/beta1^4 (30%), F both 0 and 1, alpha3 frozen while F = 0, and a
// gain-only instance (CUBIC = 0) whose alpha3 stays 0.
module tb_cal_estimator;
  import adc_cal_pkg::*;

  localparam real B1 = 7.76, B3 = -12.8, DELTA = 0.1;
  localparam int  N  = 300000;

  logic    clk = 1'b0, rst_n = 1'b0, valid = 1'b0, pn = 1'b0;
  sample_t d_res = '0, d_res_lin = '0;
  coef_t   a1, a3, a1l, a3l;
  logic    f, fl, wd, wdl;
  err_t    ige, ine, igel, inel;
  int checks = 0, failures = 0;

  cal_estimator #(.CUBIC(1'b1), .MU_REF(6), .L(1000)) dut (
    .clk, .rst_n, .valid, .d_res, .pn, .alpha1(a1), .alpha3(a3), .f, .ige, .ine, .window_done(wd));
  cal_estimator #(.CUBIC(1'b0), .MU_REF(6), .L(1000)) dut_lin (
    .clk, .rst_n, .valid, .d_res(d_res_lin), .pn, .alpha1(a1l), .alpha3(a3l), .f(fl), .ige(igel), .ine(inel), .window_done(wdl));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  real a1_sum = 0, a3_sum = 0, a1l_sum = 0;
  int  n_avg = 0, n_f0 = 0, n_f1 = 0, n_move_f0 = 0, n_a3l_nz = 0;
  coef_t a3_prev;
  logic  f_prev;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      real q, v, vo, c1, c3, c1l;
      bit  p;
      @(negedge clk);
      if (n > 0 && a3 != a3_prev && !f_prev) n_move_f0++;
      a3_prev = a3;
      f_prev  = f;
      if (f) n_f1++; else n_f0++;
      if (a3l != 0) n_a3l_nz++;
      p  = 1'($urandom);
      q  = DELTA * (real'($urandom) / 4294967295.0 - 0.5);
      v  = -(q + (p ? DELTA / 2.0 : -DELTA / 2.0));
      vo = B1 * v + B3 * v * v * v;
      c1 = coef_to_real(a1);
      c3 = coef_to_real(a3);
      c1l = coef_to_real(a1l);
      pn        = p;
      valid     = 1'b1;
      d_res     = to_sample(c1 * vo + c3 * vo * vo * vo);
      d_res_lin = to_sample(c1l * (B1 * v));
      if (n >= N - 100000) begin
        a1_sum += c1; a3_sum += c3; a1l_sum += c1l; n_avg++;
      end
    end
    begin
      real a1m, a3m, a1lm, a3i;
      a1m = a1_sum / n_avg; a3m = a3_sum / n_avg; a1lm = a1l_sum / n_avg;
      a3i = -B3 / (B1 * B1 * B1 * B1);
      $display("alpha1=%g (ideal %g) alpha3=%g (ideal %g) gain-only alpha1=%g; F0=%0d F1=%0d",
               a1m, 1.0 / B1, a3m, a3i, a1lm, n_f0, n_f1);
      check(fabs(a1m * B1 - 1.0) < 0.005, "alpha1 converges to 1/beta1");
      check(fabs(a3m - a3i) / a3i < 0.3, "alpha3 converges to -beta3/beta1^4");
      check(fabs(a1lm * B1 - 1.0) < 0.005, "gain-only alpha1 converges");
      check(n_a3l_nz == 0, "gain-only alpha3 stays 0");
      check(n_f0 > 0 && n_f1 > 0, "F takes both values");
      check(n_move_f0 == 0, "alpha3 frozen while F = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
