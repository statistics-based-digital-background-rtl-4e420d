// Test of calibrated_stage as the first stage of a converter with an ideal
// back end. The testbench models the analog stage (20 comparators, PN
// element, amplifier 7.76*V - 12.8*V^3) and supplies D_i, PN and D_o for
// every sample. Checks: d_sum equals d_stage + d_res with the documented
// 2-cycle latency on every sample, and after the loops settle (MU_REF = 10,
// 10^6 samples) d_sum reproduces the analog input to better than 2^-12 rms,
// while before calibration it does not.
module tb_calibrated_stage;
  import adc_cal_pkg::*;

  localparam real B1 = 7.76, B3 = -12.8, DELTA = 0.1;
  localparam int  N  = 1000000;

  logic    clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0, pn = 1'b0, valid_o, f, wd;
  sample_t d_stage = '0, d_o = '0, d_sum, d_res;
  coef_t   a1, a3;
  err_t    ige, ine;
  int checks = 0, failures = 0;

  calibrated_stage #(.MU_REF(10)) dut (
    .clk, .rst_n, .valid_i, .d_stage, .pn, .d_o, .valid_o, .d_sum, .d_res,
    .alpha1(a1), .alpha3(a3), .f, .ige, .ine, .window_done(wd));

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

  sample_t ds_h [0:3];
  sample_t dr_h [0:3];
  real     vin_h [0:3];
  real     e_first = 0, e_last = 0;
  int      n_first = 0, n_last = 0, n_sum_bad = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      real vin, v, vo;
      int  k;
      bit  p;
      @(negedge clk);
      // outputs of the sample applied two edges ago
      for (int i = 3; i > 0; i--) begin
        ds_h[i] = ds_h[i-1]; dr_h[i] = dr_h[i-1]; vin_h[i] = vin_h[i-1];
      end
      dr_h[1] = d_res;                 // d_res of the sample applied one edge ago
      if (n > 4) begin
        if (d_sum != ds_h[2] + dr_h[2]) n_sum_bad++;
        if (!valid_o) n_sum_bad++;
        if (n < 20000) begin e_first += (sample_to_real(d_sum) - vin_h[2]) ** 2; n_first++; end
        if (n >= N - 100000) begin e_last += (sample_to_real(d_sum) - vin_h[2]) ** 2; n_last++; end
      end
      vin = 0.97 * (2.0 * real'($urandom) / 4294967295.0 - 1.0);
      p   = 1'($urandom);
      k   = 0;
      for (int j = 0; j < 20; j++) if (vin > -1.0 + DELTA / 2.0 + DELTA * j) k++;
      v   = vin - (DELTA / 2.0) * (2.0 * k - 20.0 + (p ? 1.0 : -1.0));
      vo  = B1 * v + B3 * v * v * v;
      d_stage = to_sample((DELTA / 2.0) * (2.0 * k - 20.0 + (p ? 1.0 : -1.0)));
      d_o     = to_sample(vo);
      pn      = p;
      valid_i = 1'b1;
      ds_h[0] = d_stage;
      vin_h[0] = vin;
    end
    begin
      real r_first, r_last;
      r_first = $sqrt(e_first / n_first);
      r_last  = $sqrt(e_last / n_last);
      $display("rms error before %g after %g; alpha1=%g alpha3=%g", r_first, r_last,
               coef_to_real(a1), coef_to_real(a3));
      check(n_sum_bad == 0, $sformatf("d_sum = d_stage + d_res, 2-cycle latency (%0d bad)", n_sum_bad));
      check(r_first > 1.0 / 4096.0, "uncalibrated error above 2^-12");
      check(r_last < 1.0 / 4096.0, "calibrated error below 2^-12 rms");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
