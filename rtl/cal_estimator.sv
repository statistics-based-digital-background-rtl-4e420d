// Background estimation block of one calibrated stage.
//
// Two adaptive loops, built without any multi-bit multiplier:
//   gain loop:           alpha1 <- alpha1 - mu1 * IGE
//   nonlinearity loop:   alpha3 <- alpha3 + mu3 * INE * F
// with mu = 2^-MU counted in LSBs of a MU_REF-bit coefficient fraction
// (see coeff_integrator).
// IGE and INE come from the conditional comparisons of error_detector; F is
// the gain-error monitor's flag, so alpha3 only moves while the averaged gain
// error is below its threshold. Each loop is one accumulator. With CUBIC = 0
// the block is gain-only (alpha3 stays 0, no monitor), as used for the second
// stage of the example converter. The structure follows the method's
// estimation diagram; the loop signs were chosen so that both loops are
// negative feedback (the mean of IGE rises with the gain error, the mean of
// INE falls as the third-order error rises).
//
// Interface: d_res and pn (1 = +1) are sampled on clock edges with valid
// high; alpha1 and alpha3 are registered and change one cycle later.
module cal_estimator
  import adc_cal_pkg::*;
#(
  parameter bit    CUBIC   = 1'b1,
  parameter real   DELTA   = 0.1,
  parameter real   W       = 0.0125,
  parameter int    MU1     = 10,
  parameter int    MU3     = 9,
  parameter int    MU_REF  = 14,
  parameter int    L       = 10000,
  parameter real   E_TH    = 0.0125,
  parameter coef_t A1_INIT = to_coef(0.125)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid,
  input  sample_t d_res,
  input  logic    pn,
  output coef_t   alpha1,
  output coef_t   alpha3,
  output logic    f,
  output err_t    ige,
  output err_t    ine,
  output logic    window_done
);

  error_detector #(.DELTA(DELTA), .W(W)) u_det (
    .valid (valid),
    .d_res (d_res),
    .pn    (pn),
    .ige   (ige),
    .ine   (ine)
  );

  coeff_integrator #(.MU(MU1), .MU_REF(MU_REF), .NEGATE(1'b1), .INIT(A1_INIT)) u_int1 (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (valid),
    .err   (ige),
    .alpha (alpha1)
  );

  if (CUBIC) begin : g_cubic
    logic signed [$clog2(2*L+1):0] e1_sum;

    gain_error_monitor #(.L(L), .E_TH(E_TH)) u_mon (
      .clk         (clk),
      .rst_n       (rst_n),
      .valid       (valid),
      .ige         (ige),
      .f           (f),
      .window_done (window_done),
      .e1_sum      (e1_sum)
    );

    coeff_integrator #(.MU(MU3), .MU_REF(MU_REF), .NEGATE(1'b0), .INIT('0)) u_int3 (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (valid && f),
      .err   (ine),
      .alpha (alpha3)
    );
  end else begin : g_linear
    assign f           = 1'b0;
    assign window_done = 1'b0;
    assign alpha3      = '0;
  end

endmodule
