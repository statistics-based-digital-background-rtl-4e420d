// Calibrated 12-bit pipelined ADC: analog stage models plus digital back end.
//
// Four 3-bit stages with a nominal gain of 8 and a 2-bit flash convert the
// input; the first two stages add a PN-driven calibration signal to their
// residue. The digital back end estimates, in the background and from the
// statistics of the digitised residue alone, the first stage's amplifier
// gain and third-order error and the second stage's gain error, and
// corrects them with D_res = alpha1*D_o + alpha3*D_o^3.
// The analog stages are behavioural models (real-valued ports). Their
// defaults are the imperfections of the simulated example converter: the
// amplifier coefficients of each stage, random comparator offsets of rms
// 10% of the step (25% for the flash), DAC element mismatch of 0.1%, 0.2%,
// 0.3% and 0.4% in stages 1 to 4, and input-referred thermal noise of
// 6.5e-5 rms per stage (about 80 dB for a full-scale sine). The noise level
// is chosen here to give that figure; SEED selects one set of random
// offsets and mismatches. The digital back end, adc_cal_digital, is
// synthesizable on its own and does not correct the DAC mismatch.
//
// Interface: vin is sampled on every rising edge of clk; dout (sample
// format) and dout_code (12-bit offset binary) for that sample appear
// 9 rising edges later, flagged by dout_valid. rst_n is active-low,
// synchronous, for the digital part.
module pipelined_adc
  import adc_cal_pkg::*;
#(
  parameter real BETA1_S1 = 7.76,
  parameter real BETA3_S1 = -12.8,
  parameter real BETA1_S2 = 7.7,
  parameter real BETA3_S2 = -13.75,
  parameter real BETA1_S3 = 7.58,
  parameter real BETA3_S3 = -14.95,
  parameter real BETA1_S4 = 7.63,
  parameter real BETA3_S4 = -14.86,
  parameter int  MU1_S1   = 10,
  parameter int  MU3_S1   = 9,
  parameter int  MU1_S2   = 9,
  parameter int  MU_REF   = 14,
  parameter real W        = 0.0125,
  parameter int  L        = 10000,
  parameter real E_TH     = 0.0125,
  parameter real OFS_SIGMA       = 0.1,
  parameter real FLASH_OFS_SIGMA = 0.25,
  parameter real MISMATCH_S1     = 0.001,
  parameter real MISMATCH_S2     = 0.002,
  parameter real MISMATCH_S3     = 0.003,
  parameter real MISMATCH_S4     = 0.004,
  parameter real NOISE_RMS       = 6.5e-5,
  parameter int  SEED            = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  real         vin,
  output logic        dout_valid,
  output sample_t     dout,
  output logic [11:0] dout_code,
  output coef_t       alpha1_s1,
  output coef_t       alpha3_s1,
  output coef_t       alpha1_s2,
  output logic        f_s1,
  output err_t        ige_s1,
  output err_t        ine_s1,
  output err_t        ige_s2
);

  logic [19:0] th1, th2;
  logic [9:0]  th3, th4;
  logic [2:0]  thf;
  logic        pn1, pn2;
  real         vo1, vo2, vo3, vo4;

  mdac_stage_model #(.M(20), .HAS_PN(1'b1), .BETA1(BETA1_S1), .BETA3(BETA3_S1),
                     .OFS_SIGMA(OFS_SIGMA), .MISMATCH_SIGMA(MISMATCH_S1),
                     .NOISE_RMS(NOISE_RMS), .SEED(SEED)) u_s1 (
    .clk(clk), .vin(vin), .pn(pn1),  .thermo(th1), .vo(vo1));
  mdac_stage_model #(.M(20), .HAS_PN(1'b1), .BETA1(BETA1_S2), .BETA3(BETA3_S2),
                     .OFS_SIGMA(OFS_SIGMA), .MISMATCH_SIGMA(MISMATCH_S2),
                     .NOISE_RMS(NOISE_RMS), .SEED(SEED + 1)) u_s2 (
    .clk(clk), .vin(vo1), .pn(pn2),  .thermo(th2), .vo(vo2));
  mdac_stage_model #(.M(10), .HAS_PN(1'b0), .BETA1(BETA1_S3), .BETA3(BETA3_S3),
                     .OFS_SIGMA(OFS_SIGMA), .MISMATCH_SIGMA(MISMATCH_S3),
                     .NOISE_RMS(NOISE_RMS), .SEED(SEED + 2)) u_s3 (
    .clk(clk), .vin(vo2), .pn(1'b0), .thermo(th3), .vo(vo3));
  mdac_stage_model #(.M(10), .HAS_PN(1'b0), .BETA1(BETA1_S4), .BETA3(BETA3_S4),
                     .OFS_SIGMA(OFS_SIGMA), .MISMATCH_SIGMA(MISMATCH_S4),
                     .NOISE_RMS(NOISE_RMS), .SEED(SEED + 3)) u_s4 (
    .clk(clk), .vin(vo3), .pn(1'b0), .thermo(th4), .vo(vo4));
  flash_adc_model #(.M(3), .OFS_SIGMA(FLASH_OFS_SIGMA), .SEED(SEED + 4)) u_flash (
    .clk(clk), .vin(vo4), .thermo(thf));

  adc_cal_digital #(
    .M1(20), .M2(20), .M3(10), .M4(10), .MF(3),
    .MU1_S1(MU1_S1), .MU3_S1(MU3_S1), .MU1_S2(MU1_S2), .MU_REF(MU_REF),
    .W(W), .L(L), .E_TH(E_TH), .OUT_BITS(12)
  ) u_dig (
    .clk(clk), .rst_n(rst_n),
    .thermo1(th1), .thermo2(th2), .thermo3(th3), .thermo4(th4), .thermo_f(thf),
    .pn1(pn1), .pn2(pn2),
    .dout_valid(dout_valid), .dout(dout), .dout_code(dout_code),
    .alpha1_s1(alpha1_s1), .alpha3_s1(alpha3_s1), .alpha1_s2(alpha1_s2),
    .f_s1(f_s1), .ige_s1(ige_s1), .ine_s1(ine_s1), .ige_s2(ige_s2)
  );

endmodule
