// Test of the behavioural 2-bit flash model: random inputs, including
// values right at the levels -2/3, 0, +2/3, are compared with the expected
// thermometer word after each rising edge. A second instance with random
// offsets (rms 0.25 of the 2/3 step) is swept across the input range; each
// comparator must switch exactly once, within one step of its nominal
// level, and at least one must be clearly away from it.
module tb_flash_adc_model;

  logic       clk = 1'b0;
  real        vin = 0.0;
  logic [2:0] th;
  int checks = 0, failures = 0;

  flash_adc_model dut (.clk, .vin, .thermo(th));

  real        vs = 0.0;
  logic [2:0] ths;
  flash_adc_model #(.OFS_SIGMA(0.25), .SEED(3)) duts (.clk, .vin(vs), .thermo(ths));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      real x;
      logic [2:0] e;
      @(negedge clk);
      if (t % 10 == 0) x = -2.0 / 3.0 + (2.0 / 3.0) * ($urandom_range(0, 2)) + ($urandom_range(0, 1) ? 1e-6 : -1e-6);
      else             x = 2.0 * real'($urandom) / 4294967295.0 - 1.0;
      vin = x;
      e = {x > 2.0 / 3.0, x > 0.0, x > -2.0 / 3.0};
      @(posedge clk);
      #1;
      checks++;
      if (th !== e) begin failures++; $display("FAIL x=%f got %b exp %b", x, th, e); end
    end
    begin
      real sw [3], omax = 0.0;
      int  n_up [3];
      logic [2:0] prev;
      n_up = '{0, 0, 0};
      prev = '0;
      for (int t = 0; t <= 20000; t++) begin
        real x;
        @(negedge clk);
        x = -1.5 + 3.0 * real'(t) / 20000.0;
        vs = x;
        @(posedge clk);
        #1;
        for (int j = 0; j < 3; j++)
          if (t > 0 && ths[j] != prev[j]) begin
            n_up[j]++;
            sw[j] = x;
          end
        prev = ths;
      end
      for (int j = 0; j < 3; j++) begin
        real o;
        o = sw[j] - (-2.0 / 3.0 + (2.0 / 3.0) * j);
        $display("flash comparator %0d offset %g", j, o);
        checks++;
        if (fabs(o) > omax) omax = fabs(o);
        if (n_up[j] != 1 || fabs(o) > 2.0 / 3.0) begin
          failures++;
          $display("FAIL: flash comparator %0d offset", j);
        end
      end
      checks++;
      if (omax < 0.02) begin
        failures++;
        $display("FAIL: no flash offset applied");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

endmodule
