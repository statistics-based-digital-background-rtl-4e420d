// Self-checking test of error_detector with the first-stage settings
// (Delta = 0.1, W = 0.0125). Random residues over [-0.15, 0.15], plus
// residues placed exactly on every threshold, are applied with both PN
// values; IGE and INE are compared with the conditional comparisons worked
// out in real arithmetic. valid = 0 must give zero errors.
module tb_error_detector;
  import adc_cal_pkg::*;

  localparam real DELTA = 0.1, W = 0.0125;

  logic    valid, pn;
  sample_t d;
  err_t    ige, ine;
  int checks = 0, failures = 0;

  error_detector #(.DELTA(DELTA), .W(W)) dut (.valid, .d_res(d), .pn, .ige, .ine);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // h(x | PN = m): 2 when PN = m and x >= 0
  function automatic int h(input real x, input bit sel);
    return (sel && x >= 0.0) ? 2 : 0;
  endfunction

  function automatic real r(input real t);
    return sample_to_real(to_sample(t));
  endfunction

  task automatic apply(input sample_t v, input bit p, input bit vld);
    real x;
    int  e_ige, e_ine;
    d = v; pn = p; valid = vld;
    #1;
    x = sample_to_real(v);
    // thresholds as the hardware holds them (rounded to the sample format)
    e_ige = h(r(-DELTA / 2.0) - x, vld && p) - h(r(DELTA / 2.0) - x, vld && !p);
    e_ine = (h(x - r(-W), vld && p) - h(x - r(DELTA - W), vld && !p))
          - (h(r(-DELTA + W) - x, vld && p) - h(r(W) - x, vld && !p));
    checks += 2;
    if (int'(ige) != e_ige) begin failures++; $display("FAIL IGE d=%f pn=%0d got %0d exp %0d", x, p, ige, e_ige); end
    if (int'(ine) != e_ine) begin failures++; $display("FAIL INE d=%f pn=%0d got %0d exp %0d", x, p, ine, e_ine); end
  endtask

  int n_ige [3], n_ine [3];

  initial begin
    real th [6];
    th = '{-DELTA / 2.0, DELTA / 2.0, -DELTA + W, W, -W, DELTA - W};
    for (int t = 0; t < 5000; t++) begin
      real x;
      x = -0.15 + 0.3 * real'($urandom) / 4294967295.0;
      apply(to_sample(x), 1'($urandom), 1'b1);
      n_ige[int'(ige) / 2 + 1]++;
      n_ine[int'(ine) / 2 + 1]++;
    end
    foreach (th[i]) for (int p = 0; p < 2; p++) for (int o = -1; o <= 1; o++)
      apply(to_sample(th[i]) + sample_t'(o), 1'(p), 1'b1);
    for (int t = 0; t < 50; t++) apply(sample_t'($urandom), 1'($urandom), 1'b0);
    // all three error values must have occurred
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_ige[i] == 0) begin failures++; $display("FAIL IGE value %0d never seen", 2 * i - 2); end
      if (n_ine[i] == 0) begin failures++; $display("FAIL INE value %0d never seen", 2 * i - 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
