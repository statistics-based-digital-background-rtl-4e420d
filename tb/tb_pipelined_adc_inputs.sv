// Calibration of the pipelined ADC with the other input signals the method
// is meant for: uniform random samples, a four-tone sine (0.0994, 0.1956,
// 0.2947 and 0.3909 of the sample rate, equal amplitudes), a slow ramp
// across the full scale, as used for residue and output histograms, and
// Gaussian samples of rms 1/3 of full scale.
//
// Each input runs from reset for N_SAMPLES conversions. For each the test
// checks that the conversion error at the end is below one 12-bit LSB rms and
// smaller than at the start, that the stage-1 and stage-2 gain coefficients
// reach the inverse amplifier gains, and that the nonlinearity loop was
// enabled (F = 1) at some point. For the ramp it also checks that the output
// codes fill the 12-bit range with no missing code and that the
// code-density DNL and INL of the upper half are below 1 LSB; it also
// histograms the first stage's digitised residue per PN value and checks
// that its two centre-point probabilities, unequal at the start, agree after
// calibration. A second converter with
// DAC element mismatch of 0.5% rms in every stage (uncorrected) runs on the
// same input; its stage-1 gain coefficient must still reach 1/beta1 within
// 1%: the size error of the PN element itself shifts the reference of the
// gain loop, the other elements hardly matter.
// MU_REF is lowered so the loops settle within the two million samples of
// each run; the adaptation itself is unchanged.
module tb_pipelined_adc_inputs;
  import adc_cal_pkg::*;

  localparam int  MU_REF_TB = 10;
  localparam int  N_SAMPLES = 2000000;
  localparam int  LAT       = 9;
  localparam real B1 = 7.76, B1S2 = 7.7;
  localparam real TWO_PI = 6.283185307179586;

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

  logic        dv_m, f_m;
  sample_t     dout_m;
  logic [11:0] code_m;
  coef_t       a1_m, a3_m, a1s2_m;
  err_t        ige1_m, ine1_m, ige2_m;

  pipelined_adc #(.MU_REF(MU_REF_TB), .MISMATCH_S1(0.005), .MISMATCH_S2(0.005),
                  .MISMATCH_S3(0.005), .MISMATCH_S4(0.005), .SEED(21)) dut_mm (
    .clk, .rst_n, .vin, .dout_valid(dv_m), .dout(dout_m), .dout_code(code_m),
    .alpha1_s1(a1_m), .alpha3_s1(a3_m), .alpha1_s2(a1s2_m), .f_s1(f_m),
    .ige_s1(ige1_m), .ine_s1(ine1_m), .ige_s2(ige2_m));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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
    repeat (4 * (N_SAMPLES + 100)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real stimulus(input int kind, input int n);
    case (kind)
      0: return 0.99 * (2.0 * real'($urandom) / 4294967295.0 - 1.0);
      1: return 0.2475 * ($sin(TWO_PI * 0.0994 * n) + $sin(TWO_PI * 0.1956 * n) +
                          $sin(TWO_PI * 0.2947 * n) + $sin(TWO_PI * 0.3909 * n));
      2:       return -0.999 + 1.998 * real'(n) / real'(N_SAMPLES);
      default: begin
        // Gaussian, rms 1/3 of full scale, clipped to the input range
        real u1, u2, g;
        u1 = (real'($urandom) + 1.0) / 4294967297.0;
        u2 = real'($urandom) / 4294967296.0;
        g  = $sqrt(-2.0 * $ln(u1)) * $cos(TWO_PI * u2) / 3.0;
        return (g > 0.99) ? 0.99 : ((g < -0.99) ? -0.99 : g);
      end
    endcase
  endfunction

  real    hist [0:15];
  longint code_cnt [4096];

  task automatic run(input int kind, input string name);
    real err_sq_first = 0, err_sq_last = 0, a1_sum = 0, a1s2_sum = 0, a1m_sum = 0;
    int  n_first = 0, n_last = 0, n_f1 = 0, missing = 0;
    // stage-1 residue below its centre point, per PN value: [window][pn][below, total]
    int  rc [2][2][2];
    real rms_first, rms_last, a1m, a1s2m;
    foreach (code_cnt[i]) code_cnt[i] = 0;
    foreach (rc[i, j, k]) rc[i][j][k] = 0;
    foreach (hist[i]) hist[i] = 0.0;
    rst_n = 1'b0;
    vin   = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N_SAMPLES; n++) begin
      @(negedge clk);
      vin = stimulus(kind, n);
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = vin;
      if (f_s1) n_f1++;
      if (dut.u_dig.u_stage1.valid_q && (n < 20000 || n >= N_SAMPLES / 2)) begin
        int w, p;
        real d;
        w = (n < 20000) ? 0 : 1;
        p = dut.u_dig.u_stage1.pn_q ? 1 : 0;
        d = sample_to_real(dut.u_dig.u_stage1.d_res);
        rc[w][p][1]++;
        if (p == 1 && d < -0.05) rc[w][p][0]++;
        if (p == 0 && d <  0.05) rc[w][p][0]++;
      end
      if (dout_valid && n > 40) begin
        real e;
        e = sample_to_real(dout) - hist[LAT+1];
        if (n < 10040) begin
          err_sq_first += e * e;
          n_first++;
        end
        if (n >= N_SAMPLES - 100000) begin
          err_sq_last += e * e;
          n_last++;
          a1_sum   += coef_to_real(a1);
          a1s2_sum += coef_to_real(a1s2);
          a1m_sum  += coef_to_real(a1_m);
        end
        if (n >= N_SAMPLES / 2) code_cnt[dout_code]++;
      end
    end
    rms_first = $sqrt(err_sq_first / n_first);
    rms_last  = $sqrt(err_sq_last / n_last);
    a1m   = a1_sum / n_last;
    a1s2m = a1s2_sum / n_last;
    $display("%s: rms error first=%g last=%g; alpha1 s1=%g (%g) s2=%g (%g); F=1 cycles=%0d",
             name, rms_first, rms_last, a1m, 1.0 / B1, a1s2m, 1.0 / B1S2, n_f1);
    check(rms_last < rms_first / 4.0, {name, ": calibration reduces conversion error"});
    check(rms_last < 2.0 / 4096.0, {name, ": calibrated error below one 12-bit LSB rms"});
    check(fabs(a1m * B1 - 1.0) < 0.005, {name, ": stage-1 alpha1 converges to 1/beta1"});
    check(fabs(a1s2m * B1S2 - 1.0) < 0.03, {name, ": stage-2 alpha1 near 1/beta1"});
    check(n_f1 > 0, {name, ": nonlinearity loop enabled"});
    $display("%s: with 0.5%% DAC mismatch alpha1 s1=%g", name, a1m_sum / n_last);
    check(fabs(a1m_sum / n_last * B1 - 1.0) < 0.01, {name, ": alpha1 converges with 0.5% DAC mismatch"});
    if (kind == 2) begin
      // second half of the ramp covers codes ~2048..4095
      for (int c = 2060; c < 4085; c++) if (code_cnt[c] == 0) missing++;
      $display("%s: missing codes in the upper half: %0d", name, missing);
      check(missing == 0, {name, ": no missing codes after calibration"});
      // Stage-1 digitised residue: the share below -Delta/2 for PN = +1 must
      // equal the share below +Delta/2 for PN = -1 once the gain is right;
      // with the initial coefficient (gain error about -3%) it is visibly off.
      begin
        real c_before, c_after;
        c_before = real'(rc[0][1][0]) / rc[0][1][1] - real'(rc[0][0][0]) / rc[0][0][1];
        c_after  = real'(rc[1][1][0]) / rc[1][1][1] - real'(rc[1][0][0]) / rc[1][0][1];
        $display("%s: P(D<-Delta/2|+1) - P(D<Delta/2|-1) first 2*10^4 samples %g, second half %g",
                 name, c_before, c_after);
        check(c_before < -0.015, {name, ": residue distribution skewed before calibration"});
        check(fabs(c_after) < 0.005, {name, ": residue centre points balanced after calibration"});
      end
      // code-density DNL and INL over the same codes, in LSB
      begin
        real avg, dnl, inl, dnl_max, inl_max;
        longint tot;
        tot = 0;
        for (int c = 2060; c < 4085; c++) tot += code_cnt[c];
        avg = real'(tot) / real'(4085 - 2060);
        inl = 0.0; dnl_max = 0.0; inl_max = 0.0;
        for (int c = 2060; c < 4085; c++) begin
          dnl = real'(code_cnt[c]) / avg - 1.0;
          inl += dnl;
          if (fabs(dnl) > dnl_max) dnl_max = fabs(dnl);
          if (fabs(inl) > inl_max) inl_max = fabs(inl);
        end
        $display("%s: max |DNL| %g LSB, max |INL| %g LSB", name, dnl_max, inl_max);
        check(dnl_max < 1.0, {name, ": DNL below 1 LSB after calibration"});
        check(inl_max < 1.0, {name, ": INL below 1 LSB after calibration"});
      end
    end
  endtask

  initial begin
    run(0, "random");
    run(1, "multi-tone");
    run(2, "ramp");
    run(3, "gaussian");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
