// Digital side of one calibrated pipeline stage.
//
// Takes the stage's own digital output D_i (with its PN contribution), the
// PN value the stage used, and the back-end's digitised version D_o of the
// stage's amplified residue, all belonging to the same sample. The
// correction block turns D_o into the digitised residue D_res, the estimator
// adapts alpha1 (and alpha3 when CUBIC = 1) from D_res and PN in the
// background, and the stage's contribution to the converter output is
//   D_sum = D_i + D_res,
// which for the first stage is the converter output D_out and for a later
// stage is the D_o of the stage in front of it. The arrangement follows the
// method's block diagram; the register placement is this design's choice.
//
// Timing: one sample per enabled cycle; d_sum/valid_o appear 2 cycles after
// the inputs (one cycle in the corrector, one output register).
module calibrated_stage
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
  input  logic    valid_i,
  input  sample_t d_stage,
  input  logic    pn,
  input  sample_t d_o,
  output logic    valid_o,
  output sample_t d_sum,
  output sample_t d_res,
  output coef_t   alpha1,
  output coef_t   alpha3,
  output logic    f,
  output err_t    ige,
  output err_t    ine,
  output logic    window_done
);

  sample_t d_stage_q;
  logic    pn_q, valid_q;

  residue_corrector #(.CUBIC(CUBIC)) u_corr (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (1'b1),
    .d_o    (d_o),
    .alpha1 (alpha1),
    .alpha3 (alpha3),
    .d_res  (d_res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_stage_q <= '0;
      pn_q      <= 1'b0;
      valid_q   <= 1'b0;
      valid_o   <= 1'b0;
      d_sum     <= '0;
    end else begin
      d_stage_q <= d_stage;
      pn_q      <= pn;
      valid_q   <= valid_i;
      valid_o   <= valid_q;
      d_sum     <= d_stage_q + d_res;
    end
  end

  cal_estimator #(
    .CUBIC(CUBIC), .DELTA(DELTA), .W(W), .MU1(MU1), .MU3(MU3), .MU_REF(MU_REF),
    .L(L), .E_TH(E_TH), .A1_INIT(A1_INIT)
  ) u_est (
    .clk         (clk),
    .rst_n       (rst_n),
    .valid       (valid_q),
    .d_res       (d_res),
    .pn          (pn_q),
    .alpha1      (alpha1),
    .alpha3      (alpha3),
    .f           (f),
    .ige         (ige),
    .ine         (ine),
    .window_done (window_done)
  );

endmodule
