// Test of the digital back end with an ideal analog pipeline modelled in
// the testbench: every stage has gain exactly 8 and no nonlinearity, so the
// ideal coefficients equal the reset value 1/8 and the back end must
// reproduce the input exactly (to the resolution of the last stage).
// The testbench stages sample on the rising edge, with the PN bits the
// back end drives, exactly as the analog stages of the converter do.
// Checks: dout matches vin with a latency of 9 edges to within 2^-12,
// dout_code is the 12-bit offset-binary value of dout, dout_valid is high
// once the pipeline is full, both PN outputs take both values, and the
// coefficients stay within 0.5% of 1/8.
module tb_adc_cal_digital;
  import adc_cal_pkg::*;

  localparam int N = 200000, LAT = 9;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [19:0] th1 = '0, th2 = '0;
  logic [9:0]  th3 = '0, th4 = '0;
  logic [2:0]  thf = '0;
  logic        pn1, pn2, dv, f1;
  sample_t     dout;
  logic [11:0] code;
  coef_t       a1, a3, a2;
  err_t        g1, n1, g2;
  int checks = 0, failures = 0;

  adc_cal_digital dut (
    .clk, .rst_n, .thermo1(th1), .thermo2(th2), .thermo3(th3), .thermo4(th4), .thermo_f(thf),
    .pn1, .pn2, .dout_valid(dv), .dout, .dout_code(code),
    .alpha1_s1(a1), .alpha3_s1(a3), .alpha1_s2(a2), .f_s1(f1),
    .ige_s1(g1), .ine_s1(n1), .ige_s2(g2));

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal stage: comparator word and amplified residue
  function automatic real stage(input real vin, input int m, input bit has_pn, input bit p,
                                output logic [19:0] th);
    real d, vd;
    d  = 2.0 / m;
    vd = 0.0;
    th = '0;
    for (int j = 0; j < m; j++) begin
      th[j] = (vin > -1.0 + d / 2.0 + d * j);
      vd += th[j] ? d / 2.0 : -d / 2.0;
    end
    if (has_pn) vd += p ? d / 2.0 : -d / 2.0;
    return 8.0 * (vin - vd);
  endfunction

  real vin = 0.0, vo1 = 0.0, vo2 = 0.0, vo3 = 0.0, vo4 = 0.0;

  always @(posedge clk) begin
    logic [19:0] t1, t2, t3, t4, tf;
    real n1v, n2v, n3v, n4v;
    n1v = stage(vin, 20, 1'b1, pn1, t1);
    n2v = stage(vo1, 20, 1'b1, pn2, t2);
    n3v = stage(vo2, 10, 1'b0, 1'b0, t3);
    n4v = stage(vo3, 10, 1'b0, 1'b0, t4);
    void'(stage(vo4, 3, 1'b0, 1'b0, tf));
    th1 <= t1; th2 <= t2; th3 <= t3[9:0]; th4 <= t4[9:0]; thf <= tf[2:0];
    vo1 <= n1v; vo2 <= n2v; vo3 <= n3v; vo4 <= n4v;
  end

  real hist [0:15];
  int  n_bad = 0, n_code_bad = 0, n_valid = 0, n_coef_bad = 0;
  int  n_pn1 [2], n_pn2 [2];
  real worst = 0.0;

  initial begin
    n_pn1 = '{0, 0}; n_pn2 = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      vin = 0.98 * (2.0 * real'($urandom) / 4294967295.0 - 1.0);
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = vin;
      n_pn1[pn1]++; n_pn2[pn2]++;
      if (n > LAT + 4) begin
        real e;
        int  exp_code;
        if (!dv) n_bad++;
        n_valid++;
        e = sample_to_real(dout) - hist[LAT + 1];
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        if (e > 1.0 / 4096.0) n_bad++;
        exp_code = $floor((sample_to_real(dout) + 1.0) * 2048.0);
        if (exp_code > 4095) exp_code = 4095;
        if (exp_code < 0) exp_code = 0;
        if (int'(code) != exp_code) n_code_bad++;
        if ((coef_to_real(a1) - 0.125) ** 2 > (0.125 * 0.005) ** 2) n_coef_bad++;
        if ((coef_to_real(a2) - 0.125) ** 2 > (0.125 * 0.005) ** 2) n_coef_bad++;
      end
    end
    $display("worst |dout - vin| = %g over %0d samples", worst, n_valid);
    checks++; if (n_bad != 0)      begin failures++; $display("FAIL: %0d samples off or not valid", n_bad); end
    checks++; if (n_code_bad != 0) begin failures++; $display("FAIL: %0d wrong output codes", n_code_bad); end
    checks++; if (n_coef_bad != 0) begin failures++; $display("FAIL: coefficients left 1/8 (%0d)", n_coef_bad); end
    checks++; if (n_pn1[0] == 0 || n_pn1[1] == 0) begin failures++; $display("FAIL: pn1 constant"); end
    checks++; if (n_pn2[0] == 0 || n_pn2[1] == 0) begin failures++; $display("FAIL: pn2 constant"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
