// End-to-end test of the calibrated pipelined ADC.
//
// A full-scale sine (or, with INPUT_KIND = 1, uniform random samples) drives
// the converter built from the behavioural analog stages with the amplifier
// errors of the example converter. The test checks that
//   * dout follows vin with the documented 9-cycle latency,
//   * the first-stage gain and cubic coefficients and the second-stage gain
//     converge to the values that invert the modelled amplifiers
//     (alpha1 = 1/beta1, alpha3 = -beta3/beta1^4 for the first stage),
//   * the conversion error after calibration is well below the error before,
// and counts every mechanism of the calibration: both PN values in both
// stages, non-zero IGE and INE, a gain-error block with F = 0 and one with
// F = 1 (the nonlinearity loop switching on), and alpha3 moving only with F.
// MU_REF is lowered so the loops settle in a few hundred thousand samples.
module tb_pipelined_adc;
  import adc_cal_pkg::*;

  localparam int  MU_REF_TB  = 8;
  localparam int  N_SAMPLES  = 600000;
  localparam int  INPUT_KIND = 0;
  localparam int  LAT        = 9;
  localparam real B1 = 7.76, B3 = -12.8, B1S2 = 7.7;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin;
  logic        dout_valid, f_s1;
  sample_t     dout;
  logic [11:0] dout_code;
  coef_t       a1, a3, a1s2;
  err_t        ige1, ine1, ige2;

  pipelined_adc #(.MU_REF(MU_REF_TB)) dut (
    .clk, .rst_n, .vin, .dout_valid, .dout, .dout_code,
    .alpha1_s1(a1), .alpha3_s1(a3), .alpha1_s2(a1s2), .f_s1,
    .ige_s1(ige1), .ine_s1(ine1), .ige_s2(ige2));

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  cyc = 0;
  real hist [0:15];

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (N_SAMPLES + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters and statistics
  longint n_pn1 [2], n_pn2 [2];
  longint n_ige_nz = 0, n_ine_nz = 0, n_f0 = 0, n_f1 = 0, n_a3_move_f0 = 0, n_a3_move_f1 = 0;
  real err_sq_first = 0, err_sq_last = 0, err_sq_lat_m1 = 0;
  int  n_first = 0, n_last = 0;
  real a1_sum = 0, a3_sum = 0, a1s2_sum = 0;
  int  n_avg = 0;
  coef_t a3_prev;
  logic  f_prev;

  initial begin
    n_pn1 = '{0, 0};
    n_pn2 = '{0, 0};
    vin = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N_SAMPLES; n++) begin
      @(negedge clk);
      // new input for the next rising edge
      if (INPUT_KIND == 0) vin = 0.99 * $sin(2.0 * 3.14159265358979 * 0.1091 * real'(n));
      else                 vin = 0.99 * (2.0 * real'($urandom) / 4294967295.0 - 1.0);
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = vin;
      cyc = n;
      n_pn1[dut.pn1]++;
      n_pn2[dut.pn2]++;
      if (ige1 != 0) n_ige_nz++;
      if (ine1 != 0) n_ine_nz++;
      if (f_s1) n_f1++; else n_f0++;
      if (n > 20 && a3 != a3_prev) begin
        if (f_prev) n_a3_move_f1++; else n_a3_move_f0++;
      end
      a3_prev = a3;
      f_prev  = f_s1;
      // vin sampled at the edge after it was set; dout for it appears
      // LAT edges later; hist[1] was taken at the last edge, so it pairs with
      // hist[LAT+1] at this negedge.
      if (dout_valid && n > 40) begin
        real e, em;
        e  = sample_to_real(dout) - hist[LAT+1];
        em = sample_to_real(dout) - hist[LAT];
        if (n < 10040) begin
          err_sq_first += e * e;
          err_sq_lat_m1 += em * em;
          n_first++;
        end
        if (n >= N_SAMPLES - 100000) begin
          err_sq_last += e * e;
          n_last++;
          a1_sum   += coef_to_real(a1);
          a3_sum   += coef_to_real(a3);
          a1s2_sum += coef_to_real(a1s2);
          n_avg++;
        end
      end
    end
    begin
      real rms_first, rms_last, rms_wrong, a1m, a3m, a1s2m, a1i, a3i;
      rms_first = $sqrt(err_sq_first / n_first);
      rms_wrong = $sqrt(err_sq_lat_m1 / n_first);
      rms_last  = $sqrt(err_sq_last / n_last);
      a1m = a1_sum / n_avg; a3m = a3_sum / n_avg; a1s2m = a1s2_sum / n_avg;
      a1i = 1.0 / B1;
      a3i = -B3 / (B1 * B1 * B1 * B1);
      $display("rms error first=%g last=%g (wrong latency %g); LSB12=%g", rms_first, rms_last, rms_wrong, 2.0/4096);
      $display("alpha1 s1 mean=%g ideal=%g; alpha3 s1 mean=%g ideal=%g; alpha1 s2 mean=%g (1/beta=%g)",
               a1m, a1i, a3m, a3i, a1s2m, 1.0 / B1S2);
      $display("F blocks: f0 cycles=%0d f1 cycles=%0d; alpha3 moves with F=1: %0d, with F=0: %0d",
               n_f0, n_f1, n_a3_move_f1, n_a3_move_f0);
      check(rms_first < 0.02, "output tracks input with 9-cycle latency");
      check(rms_wrong > 5.0 * rms_first, "output does not match any other latency");
      check(rms_last < rms_first / 4.0, "calibration reduces conversion error");
      check(rms_last < 2.0 / 4096.0, "calibrated error below one 12-bit LSB rms");
      check(fabs(a1m - a1i) / a1i < 0.005, "stage-1 alpha1 converges to 1/beta1");
      check(fabs(a3m - a3i) / a3i < 0.5, "stage-1 alpha3 converges near -beta3/beta1^4");
      check(fabs(a1s2m - 1.0 / B1S2) * B1S2 < 0.03, "stage-2 alpha1 near 1/beta1");
      check(n_pn1[0] > 0 && n_pn1[1] > 0, "PN1 takes both values");
      check(n_pn2[0] > 0 && n_pn2[1] > 0, "PN2 takes both values");
      check(n_ige_nz > 0, "IGE non-zero");
      check(n_ine_nz > 0, "INE non-zero");
      check(n_f0 > 0, "F=0 happened (nonlinearity loop frozen)");
      check(n_f1 > 0, "F=1 happened (nonlinearity loop running)");
      check(n_a3_move_f1 > 0, "alpha3 updated while F=1");
      check(n_a3_move_f0 == 0, "alpha3 frozen while F=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
