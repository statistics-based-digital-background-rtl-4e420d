// Shared types and constants of the calibrated pipelined ADC.
//
// Every digital sample (stage outputs D_i, back-end outputs D_o, corrected
// residues D_res and the converter output D_out) is a signed fixed-point
// number normalised to the reference voltage, so that full scale is [-1, +1].
// FRAC fractional bits keep the rounding of non-binary step sizes such as
// Delta/2 = 1/20 far below one LSB of a 12-bit converter. The correction
// coefficients alpha1 and alpha3 use their own, wider format with CFRAC
// fractional bits, the same scale as in D_res = alpha1*D_o + alpha3*D_o^3.
// The widths are this design's choice; the stage geometry (comparator counts,
// nominal gain of 8) follows the 12-bit example converter being implemented.
package adc_cal_pkg;

  // Sample format: signed, FRAC fractional bits, range [-8, 8).
  parameter int FRAC = 20;
  parameter int DW   = 24;
  typedef logic signed [DW-1:0] sample_t;

  // Coefficient format: signed, CFRAC fractional bits, range [-2, 2).
  parameter int CFRAC = 30;
  parameter int CW    = 32;
  typedef logic signed [CW-1:0] coef_t;

  // Instantaneous errors IGE and INE take the values -2, 0, +2.
  typedef logic signed [2:0] err_t;

  // Nominal inter-stage gain of every 3-bit stage is 8: a 3-bit shift.
  parameter int GAIN_SHIFT = 3;

  // Real value -> sample format, rounded to nearest. Used for constants only.
  function automatic sample_t to_sample(input real x);
    real s;
    s = x * real'(64'(1) << FRAC);
    return sample_t'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Real value -> coefficient format, rounded to nearest. Constants only.
  function automatic coef_t to_coef(input real x);
    real s;
    s = x * real'(64'(1) << CFRAC);
    return coef_t'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Sample format -> real, for testbenches and models.
  function automatic real sample_to_real(input sample_t v);
    return real'(v) / real'(64'(1) << FRAC);
  endfunction

  function automatic real coef_to_real(input coef_t v);
    return real'(v) / real'(64'(1) << CFRAC);
  endfunction

endpackage
