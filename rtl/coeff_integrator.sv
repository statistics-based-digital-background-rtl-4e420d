// Discrete-time integrator that produces one correction coefficient.
//
// An accumulator adds the instantaneous error times a power-of-2 step size,
// so the "multiplication" by mu is a left shift of the small error value
// into the coefficient's fractional bits:
//   alpha(n+1) = alpha(n) + SIGN * mu * err(n)        (when en is high)
// The step size mu = 2^-MU is counted in units of one LSB of a coefficient
// word with MU_REF fractional bits (14 by default), so the value actually
// added is err * 2^-(MU_REF + MU); the accumulator keeps CFRAC >= MU_REF + MU
// fractional bits so that no update is lost.
// SIGN = -1 (NEGATE = 1) is needed for the gain loop, whose error has the
// same sign as the gain error; the nonlinearity loop uses SIGN = +1. The
// accumulator saturates at the ends of the coefficient range instead of
// wrapping. INIT is the value after reset (1/8 for alpha1, the inverse of the
// nominal stage gain). The sign convention, saturation and initial values
// are this design's choice.
//
// Interface: err is sampled when en is high; alpha is the registered value.
module coeff_integrator
  import adc_cal_pkg::*;
#(
  parameter int    MU     = 10,
  parameter int    MU_REF = 14,
  parameter bit    NEGATE = 1'b0,
  parameter coef_t INIT   = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  err_t  err,
  output coef_t alpha
);

  localparam int AW = CW + 1;
  typedef logic signed [AW-1:0] acc_t;
  localparam acc_t AMAX = acc_t'(coef_t'({1'b0, {(CW-1){1'b1}}}));
  localparam acc_t AMIN = acc_t'(coef_t'({1'b1, {(CW-1){1'b0}}}));

  acc_t step, next;

  always_comb begin
    step = acc_t'(err) <<< (CFRAC - MU_REF - MU);
    next = NEGATE ? acc_t'(alpha) - step : acc_t'(alpha) + step;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) alpha <= INIT;
    else if (en) begin
      if (next > AMAX)      alpha <= coef_t'(AMAX);
      else if (next < AMIN) alpha <= coef_t'(AMIN);
      else                  alpha <= coef_t'(next);
    end
  end

  initial assert (MU_REF + MU >= 0 && MU_REF + MU <= CFRAC) else $error("coeff_integrator: MU out of range");

endmodule
