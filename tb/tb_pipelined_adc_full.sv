// Full-size end-to-end test of the calibrated pipelined ADC: every
// parameter of the converter at its default (step sizes 2^-10 and 2^-9 for
// the first stage, 2^-9 for the second, L = 10^4, W = e_th = 0.0125).
// A full-scale sine at 0.1091 of the sample rate is converted for 5*10^7
// samples; the checks are those of tb_pipelined_adc, with the coefficients
// averaged over the last 5*10^6 samples, plus a convergence check: the rms
// error over samples 4*10^6..5*10^6 must already be within 1.5 times the
// final one. The rms error of every block of 10^6 samples is printed.
// The worst of the 2nd to 9th harmonics of the 12-bit output code is
// measured on 16384 samples at the start and at the end: calibration must
// lower it by more than 6 dB, to below -72 dBc (the uncorrected DAC
// mismatch of the stages leaves the rest).
// About one minute of simulation.
module tb_pipelined_adc_full;
  import adc_cal_pkg::*;

  localparam int  N_SAMPLES  = 50000000;
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

  pipelined_adc dut (
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
  // 12-bit output records at the start and at the end for harmonic analysis
  localparam int NREC = 16384;
  localparam real FIN = 0.1091;
  real rec_pre [NREC], rec_post [NREC];
  int  n_pre = 0, n_post = 0;

  // Worst harmonic (2nd..9th) relative to the fundamental, in dB, from a
  // Blackman-Harris windowed DFT evaluated at the (aliased) harmonic
  // frequencies.
  function automatic real worst_harmonic_db(ref real x [NREC]);
    real re, im, p1, pk, pmax, w, ph;
    pmax = 0.0;
    p1 = 0.0;
    for (int k = 1; k <= 9; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NREC; n++) begin
        ph = 6.283185307179586 * n / (NREC - 1);
        w  = 0.35875 - 0.48829 * $cos(ph) + 0.14128 * $cos(2.0 * ph) - 0.01168 * $cos(3.0 * ph);
        ph = 6.283185307179586 * k * FIN * n;
        re += w * x[n] * $cos(ph);
        im -= w * x[n] * $sin(ph);
      end
      pk = re * re + im * im;
      if (k == 1) p1 = pk;
      else if (pk > pmax) pmax = pk;
    end
    return 10.0 * $log10(p1 / pmax);
  endfunction
  // convergence record: rms error of each block of 10^6 samples
  localparam int CHUNK = 1000000;
  real err_sq_chunk = 0, chunk_rms [N_SAMPLES / CHUNK];
  int  n_chunk = 0;
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
      if ((n + 1) % CHUNK == 0) begin
        chunk_rms[n / CHUNK] = $sqrt(err_sq_chunk / ((n_chunk > 0) ? n_chunk : 1));
        if ((n + 1) / CHUNK <= 10 || (n + 1) % (10 * CHUNK) == 0)
          $display("after %0d samples: rms error %g, alpha1 %g, alpha3 %g, F %0d",
                   n + 1, chunk_rms[n / CHUNK], coef_to_real(a1), coef_to_real(a3), f_s1);
        err_sq_chunk = 0.0;
        n_chunk = 0;
      end
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
        if (n_pre < NREC) begin
          rec_pre[n_pre] = (real'(dout_code) - 2047.5) / 2048.0;
          n_pre++;
        end
        if (n >= N_SAMPLES - NREC) begin
          rec_post[n_post] = (real'(dout_code) - 2047.5) / 2048.0;
          n_post++;
        end
        err_sq_chunk += e * e;
        n_chunk++;
        if (n >= N_SAMPLES - 5000000) begin
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
      check(chunk_rms[4] < 1.5 * rms_last, "converged within 5*10^6 samples");
      begin
        real sf_pre, sf_post;
        sf_pre  = worst_harmonic_db(rec_pre);
        sf_post = worst_harmonic_db(rec_post);
        $display("worst harmonic below the fundamental (12-bit code): before %0.1f dB, after %0.1f dB",
                 sf_pre, sf_post);
        check(n_pre == NREC && n_post == NREC, "output records complete");
        check(sf_post > sf_pre + 6.0, "calibration removes harmonic distortion");
        check(sf_post > 72.0, "harmonics below -72 dBc after calibration");
      end
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
