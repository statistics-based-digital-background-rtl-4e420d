// Digital output of one pipeline stage, D_i.
//
// The sub-ADC has M comparators whose reference levels are equally spaced in
// [-1, +1]; each decision is +1 (input above its level) or -1. The stage's
// digital approximation is the sum of the decisions times Delta/2, with the
// step size Delta = 2/M, which equals Delta*k - 1 when k comparators are high.
// A stage that injects the calibration signal adds (Delta/2)*PN, so
//   D_i = (2k - M + PN) * Delta/2.
// Both follow the stage model of the method; the thermometer input and the
// use of a constant multiplier (Delta/2 rounded to the sample format) are
// this design's choice.
//
// Interface: thermo[j] is comparator j's decision (1 = above); pn is the PN
// bit the stage used for this sample (1 = +1), ignored when HAS_PN = 0.
// Purely combinational.
module stage_decoder
  import adc_cal_pkg::*;
#(
  parameter int M      = 20,
  parameter bit HAS_PN = 1'b1
) (
  input  logic [M-1:0] thermo,
  input  logic         pn,
  output sample_t      d
);

  localparam sample_t HALF_STEP = to_sample(1.0 / real'(M));   // Delta/2

  logic signed [$clog2(M+1)+2:0] k2;   // 2k - M + PN

  always_comb begin
    k2 = -($bits(k2))'(M);
    for (int j = 0; j < M; j++) if (thermo[j]) k2 += ($bits(k2))'(2);
    if (HAS_PN) k2 += pn ? ($bits(k2))'(1) : -($bits(k2))'(1);
    d = sample_t'(k2) * HALF_STEP;
  end

endmodule
