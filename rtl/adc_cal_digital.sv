// Digital back end of the calibrated 12-bit pipelined ADC.
//
// The analog pipeline is four 3-bit stages (nominal inter-stage gain 8) and a
// 2-bit flash. Stages 1 and 2 have M = 20 comparators (step 1/10) and inject
// a PN calibration signal; stages 3 and 4 have M = 10 comparators (step 1/5)
// and no PN; the flash has 3 comparators. This block
//   * runs one PN generator for each of stages 1 and 2 and sends the PN bit
//     to the stage's calibration DAC element,
//   * decodes every stage's comparator word into its digital value D_i,
//   * aligns the words of one sample (stage i resolves it i cycles after
//     stage 1),
//   * recombines from the back: stages 3 and 4 use the nominal gain
//     (D_res = D_o / 8), stage 2 uses a background-calibrated gain alpha1,
//     stage 1 a calibrated gain alpha1 and cubic term alpha3,
//   * forms D_out = D_1 + D_res,1 and a 12-bit offset-binary code.
// Which stages are calibrated, and how, follows the example converter; the
// alignment, registers and output code format are this design's choice.
//
// Timing: the analog stages register their comparator words on the clock;
// the word of sample n from stage i (i = 1..4) and the flash (i = 5) is
// presented in the cycle after edge n+i-1. pn1/pn2 must be sampled by the
// analog stages on the same edges as the digital side (pn_s1 is captured
// with the comparator word). dout for the sample taken at edge n is valid
// in the cycle after edge n + LATENCY - 1, i.e. LATENCY = 9 edges later;
// dout_valid marks it.
module adc_cal_digital
  import adc_cal_pkg::*;
#(
  parameter int  M1      = 20,
  parameter int  M2      = 20,
  parameter int  M3      = 10,
  parameter int  M4      = 10,
  parameter int  MF      = 3,
  parameter int  MU1_S1  = 10,
  parameter int  MU3_S1  = 9,
  parameter int  MU1_S2  = 9,
  parameter int  MU_REF  = 14,
  parameter real W       = 0.0125,
  parameter int  L       = 10000,
  parameter real E_TH    = 0.0125,
  parameter int  OUT_BITS = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [M1-1:0]       thermo1,
  input  logic [M2-1:0]       thermo2,
  input  logic [M3-1:0]       thermo3,
  input  logic [M4-1:0]       thermo4,
  input  logic [MF-1:0]       thermo_f,
  output logic                pn1,
  output logic                pn2,
  output logic                dout_valid,
  output sample_t             dout,
  output logic [OUT_BITS-1:0] dout_code,
  output coef_t               alpha1_s1,
  output coef_t               alpha3_s1,
  output coef_t               alpha1_s2,
  output logic                f_s1,
  output err_t                ige_s1,
  output err_t                ine_s1,
  output err_t                ige_s2
);


  // ---------------------------------------------------------------- PN
  logic pn1_used, pn2_used, running;

  pn_gen #(.TAPS(10'b10_0100_0000), .SEED(10'h2A5)) u_pn1 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .pn(pn1));
  pn_gen #(.TAPS(10'b10_0000_0100), .SEED(10'h13B)) u_pn2 (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .pn(pn2));

  // The analog stages take pn1/pn2 on the same edge that these registers
  // capture, so pn*_used is the value that belongs to the comparator word.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pn1_used <= 1'b0;
      pn2_used <= 1'b0;
      running  <= 1'b0;
    end else begin
      pn1_used <= pn1;
      pn2_used <= pn2;
      running  <= 1'b1;
    end
  end

  // ---------------------------------------------------------- decoders
  sample_t d1, d2, d3, d4, d5;

  stage_decoder #(.M(M1), .HAS_PN(1'b1)) u_dec1 (.thermo(thermo1),  .pn(pn1_used), .d(d1));
  stage_decoder #(.M(M2), .HAS_PN(1'b1)) u_dec2 (.thermo(thermo2),  .pn(pn2_used), .d(d2));
  stage_decoder #(.M(M3), .HAS_PN(1'b0)) u_dec3 (.thermo(thermo3),  .pn(1'b0),     .d(d3));
  stage_decoder #(.M(M4), .HAS_PN(1'b0)) u_dec4 (.thermo(thermo4),  .pn(1'b0),     .d(d4));
  stage_decoder #(.M(MF), .HAS_PN(1'b0)) u_decf (.thermo(thermo_f), .pn(1'b0),     .d(d5));

  // --------------------------------------------------------- alignment
  // Stage 1 word + PN + valid: waits for the back end and stage 2 (7 cycles).
  // Stage 2 word + PN: waits for stages 3..5 and the back-end register (4).
  sample_t d1_al, d2_al, d3_al, d4_al;
  logic    pn1_al, pn2_al, v1_al, v2_al;

  delay_line #(.WIDTH(DW + 2), .DEPTH(7)) u_al1 (
    .clk(clk), .rst_n(rst_n), .d({d1, pn1_used, running}), .q({d1_al, pn1_al, v1_al}));
  delay_line #(.WIDTH(DW + 2), .DEPTH(4)) u_al2 (
    .clk(clk), .rst_n(rst_n), .d({d2, pn2_used, running}), .q({d2_al, pn2_al, v2_al}));
  delay_line #(.WIDTH(DW), .DEPTH(2)) u_al3 (
    .clk(clk), .rst_n(rst_n), .d(d3), .q(d3_al));
  delay_line #(.WIDTH(DW), .DEPTH(1)) u_al4 (
    .clk(clk), .rst_n(rst_n), .d(d4), .q(d4_al));

  // ------------------------------------- uncalibrated back end (3,4,5)
  // D_o,4 = D_5; D_o,3 = D_4 + D_o,4/8; D_o,2 = D_3 + D_o,3/8.
  sample_t d_o3, d_o2, d_o2_q;

  always_comb begin
    d_o3 = d4_al + (d5   >>> GAIN_SHIFT);
    d_o2 = d3_al + (d_o3 >>> GAIN_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) d_o2_q <= '0;
    else        d_o2_q <= d_o2;
  end

  // ---------------------------------------------- calibrated stage 2
  sample_t d_o1, d_res2, d_res1;
  logic    v_o1, f_s2, wd_s2, wd_s1;
  coef_t   alpha3_s2;
  err_t    ine_s2;

  calibrated_stage #(
    .CUBIC(1'b0), .DELTA(2.0 / real'(M2)), .W(W), .MU1(MU1_S2), .MU3(MU3_S1), .MU_REF(MU_REF),
    .L(L), .E_TH(E_TH)
  ) u_stage2 (
    .clk(clk), .rst_n(rst_n),
    .valid_i(v2_al), .d_stage(d2_al), .pn(pn2_al), .d_o(d_o2_q),
    .valid_o(v_o1), .d_sum(d_o1), .d_res(d_res2),
    .alpha1(alpha1_s2), .alpha3(alpha3_s2), .f(f_s2),
    .ige(ige_s2), .ine(ine_s2), .window_done(wd_s2)
  );

  // ---------------------------------------------- calibrated stage 1
  calibrated_stage #(
    .CUBIC(1'b1), .DELTA(2.0 / real'(M1)), .W(W), .MU1(MU1_S1), .MU3(MU3_S1), .MU_REF(MU_REF),
    .L(L), .E_TH(E_TH)
  ) u_stage1 (
    .clk(clk), .rst_n(rst_n),
    .valid_i(v1_al && v_o1), .d_stage(d1_al), .pn(pn1_al), .d_o(d_o1),
    .valid_o(dout_valid), .d_sum(dout), .d_res(d_res1),
    .alpha1(alpha1_s1), .alpha3(alpha3_s1), .f(f_s1),
    .ige(ige_s1), .ine(ine_s1), .window_done(wd_s1)
  );

  // --------------------------------------------------- output code
  // Offset binary: code = floor((D_out + 1) * 2^(OUT_BITS-1)), clamped.
  localparam int CS = FRAC - (OUT_BITS - 1);
  logic signed [DW:0] shifted;

  always_comb begin
    shifted = ((DW+1)'(dout) + (DW+1)'(to_sample(1.0))) >>> CS;
    if (shifted < 0)                              dout_code = '0;
    else if (shifted > (DW+1)'((1 << OUT_BITS) - 1)) dout_code = '1;
    else                                          dout_code = OUT_BITS'(shifted);
  end

endmodule
