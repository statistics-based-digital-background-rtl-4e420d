// Instantaneous error detector of the background estimator.
//
// Built only from conditional sign comparisons h(x | PN = m): the result is 2
// when PN = m and x >= 0, and 0 otherwise. Each x is a constant minus the
// corrected residue D_res, so every h is one magnitude comparison with a
// fixed threshold. With step size Delta and window W:
//   IGE  = h(-Delta/2 - D | +1) - h(Delta/2 - D | -1)
//   INE1 = h(-Delta + W - D | +1) - h(W - D | -1)
//   INE2 = h(D + W | +1)          - h(D - (Delta - W) | -1)
//   INE  = INE2 - INE1
// IGE has a mean close to the gain error e1; INE has a mean that moves with
// the third-order error e3 (and, strongly, with e1, which is why the alpha3
// loop is gated by the gain-error monitor). All of this follows the method;
// thresholds are rounded to the sample format.
//
// Interface: combinational. valid = 0 forces both errors to 0.
module error_detector
  import adc_cal_pkg::*;
#(
  parameter real DELTA = 0.1,     // stage step size, 2/M
  parameter real W     = 0.0125   // nonlinearity window
) (
  input  logic    valid,
  input  sample_t d_res,
  input  logic    pn,             // 1: PN = +1, 0: PN = -1
  output err_t    ige,
  output err_t    ine
);

  localparam sample_t T_HALF_N = to_sample(-DELTA / 2.0);   // -Delta/2
  localparam sample_t T_HALF_P = to_sample( DELTA / 2.0);   // +Delta/2
  localparam sample_t T_LOW_P  = to_sample(-DELTA + W);     // -Delta + W
  localparam sample_t T_LOW_N  = to_sample( W);             // W
  localparam sample_t T_HIGH_P = to_sample(-W);             // -W
  localparam sample_t T_HIGH_N = to_sample( DELTA - W);     // Delta - W

  // h(x | PN = m) = 2 when selected and x >= 0.
  function automatic err_t h(input logic sel, input logic ge0);
    return (sel && ge0) ? err_t'(2) : err_t'(0);
  endfunction

  err_t ige_p, ige_n, ine1_p, ine1_n, ine2_p, ine2_n;

  always_comb begin
    ige_p  = h(valid &&  pn, d_res <= T_HALF_N);
    ige_n  = h(valid && !pn, d_res <= T_HALF_P);
    ine1_p = h(valid &&  pn, d_res <= T_LOW_P);
    ine1_n = h(valid && !pn, d_res <= T_LOW_N);
    ine2_p = h(valid &&  pn, d_res >= T_HIGH_P);
    ine2_n = h(valid && !pn, d_res >= T_HIGH_N);
    ige    = ige_p - ige_n;
    ine    = (ine2_p - ine2_n) - (ine1_p - ine1_n);
  end

endmodule
