// Self-checking test of pn_gen (default degree-10 generator).
// Compares the output bit by bit with an independent reference LFSR, checks
// the period of 1023, the balance of +1/-1 over one period (512 / 511), and
// that the sequence holds while en is low.
module tb_pn_gen;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pn;
  int   checks = 0, failures = 0;

  pn_gen dut (.clk, .rst_n, .en, .pn);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit seq [0:3071];
  int ref_state, ones;

  initial begin
    ref_state = 'h2A5;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    en    <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < 3072; n++) begin
      // reference: x^10 + x^7 + 1, output = bit 9, shift left
      seq[n] = pn;
      check(pn == ref_state[9], $sformatf("bit %0d", n));
      ref_state = ((ref_state << 1) | (ref_state[9] ^ ref_state[6])) & 'h3FF;
      @(negedge clk);
    end
    for (int n = 0; n < 2048; n++) check(seq[n] == seq[n + 1023], "period 1023");
    foreach (seq[n]) if (n < 1023 && seq[n]) ones++;
    check(ones == 512, $sformatf("balance: %0d ones in a period", ones));
    // hold
    en <= 1'b0;
    begin
      bit held;
      @(negedge clk);
      held = pn;
      repeat (5) begin @(negedge clk); check(pn == held, "holds while en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
