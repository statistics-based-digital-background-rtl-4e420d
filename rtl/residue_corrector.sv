// Digital correction block g_d of one stage.
//
// Inverts the weakly nonlinear residue amplifier with the odd polynomial
//   D_res = alpha1 * D_o + alpha3 * D_o^3,
// where D_o is the stage output as digitised by the back-end stages and
// alpha1, alpha3 are supplied by the background estimator. With CUBIC = 0
// the cubic term is left out (gain-only correction, used for the second
// stage). Products are formed at full width and truncated toward minus
// infinity back to the sample format; the result saturates to the sample
// range. The widths and the one-cycle register are this design's choice.
//
// Interface: d_o, alpha1, alpha3 are sampled on the clock edge when en is
// high; d_res is registered, so it is valid one cycle after its d_o.
module residue_corrector
  import adc_cal_pkg::*;
#(
  parameter bit CUBIC = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sample_t d_o,
  input  coef_t   alpha1,
  input  coef_t   alpha3,
  output sample_t d_res
);

  localparam int PW = 64;
  typedef logic signed [PW-1:0] wide_t;

  localparam wide_t SMAX = wide_t'(sample_t'({1'b0, {(DW-1){1'b1}}}));
  localparam wide_t SMIN = wide_t'(sample_t'({1'b1, {(DW-1){1'b0}}}));

  wide_t p_lin, p_sq, p_cube, p_cub;
  wide_t sq, cube, lin, cub, sum;

  // Each product is stored in a signed variable before the arithmetic
  // shift, so the shift always sees a signed operand.
  always_comb begin
    p_lin  = wide_t'(alpha1) * wide_t'(d_o);
    lin    = p_lin >>> CFRAC;
    p_sq   = wide_t'(d_o) * wide_t'(d_o);
    sq     = p_sq >>> FRAC;
    p_cube = sq * wide_t'(d_o);
    cube   = p_cube >>> FRAC;
    p_cub  = wide_t'(alpha3) * cube;
    if (CUBIC) cub = p_cub >>> CFRAC;
    else       cub = '0;
    sum    = lin + cub;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        d_res <= '0;
    else if (en) begin
      if (sum > SMAX)      d_res <= sample_t'(SMAX);
      else if (sum < SMIN) d_res <= sample_t'(SMIN);
      else                 d_res <= sample_t'(sum);
    end
  end

endmodule
