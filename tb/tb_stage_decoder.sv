// Self-checking test of stage_decoder: a 20-comparator stage with PN and a
// 10-comparator stage without. Random comparator words are applied and the
// output compared with (2k - M + PN)/M computed in real arithmetic, within
// 2^-16 (the rounding of Delta/2 to the sample format).
module tb_stage_decoder;
  import adc_cal_pkg::*;

  logic [19:0] th20;
  logic [9:0]  th10;
  logic        pn;
  sample_t     d20, d10;
  int checks = 0, failures = 0;

  stage_decoder #(.M(20), .HAS_PN(1'b1)) dut20 (.thermo(th20), .pn(pn),   .d(d20));
  stage_decoder #(.M(10), .HAS_PN(1'b0)) dut10 (.thermo(th10), .pn(pn),   .d(d10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int k20, k10;
      real e20, e10;
      // thermometer words most of the time, arbitrary bits otherwise
      if (t % 4 != 0) begin
        k20  = $urandom_range(0, 20);
        k10  = $urandom_range(0, 10);
        th20 = 20'((64'(1) << k20) - 1);
        th10 = 10'((64'(1) << k10) - 1);
      end else begin
        th20 = 20'($urandom);
        th10 = 10'($urandom);
        k20 = $countones(th20);
        k10 = $countones(th10);
      end
      pn = 1'($urandom);
      #1;
      e20 = (2.0 * k20 - 20.0 + (pn ? 1.0 : -1.0)) / 20.0;
      e10 = (2.0 * k10 - 10.0) / 10.0;
      checks += 2;
      if (fabs(sample_to_real(d20) - e20) > 1.0 / 65536.0) begin
        failures++;
        $display("FAIL M=20 k=%0d pn=%0d got %f exp %f", k20, pn, sample_to_real(d20), e20);
      end
      if (fabs(sample_to_real(d10) - e10) > 1.0 / 65536.0) begin
        failures++;
        $display("FAIL M=10 k=%0d got %f exp %f", k10, sample_to_real(d10), e10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
