// Self-checking test of gain_error_monitor with L = 200 and E_TH = 0.05
// (limit |sum| < 10). Blocks with a chosen IGE sum (inside, on and outside
// the limit, both signs) are applied with gaps in valid; after each block F
// and e1_sum must match, F must hold during the next block, and the
// window_done pulse must come exactly every L valid samples.
module tb_gain_error_monitor;
  import adc_cal_pkg::*;

  localparam int L = 200;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, f, wd;
  err_t ige = '0;
  logic signed [$clog2(2*L+1):0] e1_sum;
  int checks = 0, failures = 0;

  gain_error_monitor #(.L(L), .E_TH(0.05)) dut (
    .clk, .rst_n, .valid, .ige, .f, .window_done(wd), .e1_sum);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One block whose IGE values sum to target (target even): |target|/2
  // values of the target's sign, then +2/-2 pairs, then zeros.
  task automatic run_block(input int target, input bit f_before);
    int vals [L];
    int n_wd, mag, i;
    mag = (target < 0) ? -target : target;
    i = 0;
    for (int j = 0; j < mag / 2; j++) vals[i++] = (target < 0) ? -2 : 2;
    while (i + 1 < L) begin vals[i++] = 2; vals[i++] = -2; end
    while (i < L) vals[i++] = 0;
    n_wd = 0;
    for (int j = 0; j < L; j++) begin
      // occasional idle cycle, with a non-zero error that must be ignored
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk);
        if (wd) n_wd++;
        valid = 1'b0; ige = err_t'(2);
      end
      @(negedge clk);
      if (wd) n_wd++;
      check(f == f_before, "F holds within a block");
      valid = 1'b1;
      ige   = err_t'(vals[j]);
    end
    @(negedge clk);
    valid = 1'b0;
    check(wd == 1'b1, "window_done after L valid samples");
    check(n_wd == 0, "no early window_done");
    check(int'(e1_sum) == target, $sformatf("e1_sum %0d exp %0d", e1_sum, target));
    check(f == ((target < 0 ? -target : target) < 10), $sformatf("F for sum %0d", target));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(f == 1'b0, "F is 0 after reset");
    run_block(40, 1'b0);
    run_block(8, 1'b0);
    run_block(-8, 1'b1);
    run_block(10, 1'b1);
    run_block(-10, 1'b0);
    run_block(0, 1'b0);
    run_block(-120, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
