// Behavioural model (not synthesizable) of one analog pipeline stage.
//
// Models the sample-and-hold, sub-ADC, sub-DAC, subtractor and residue
// amplifier of a multi-bit stage with real-valued signals normalised to the
// reference voltage:
//   * the sampled input is vin plus white Gaussian thermal noise of rms
//     NOISE_RMS (input-referred, a new value every sample);
//   * M comparators with reference levels -1 + Delta/2 + j*Delta, Delta = 2/M,
//     each shifted by OFFSET plus a fixed random offset of rms
//     OFS_SIGMA*Delta; decision +1 above the level, -1 otherwise;
//   * an SDAC of M elements of nominal size Delta/2 driven by the decisions,
//     plus, when HAS_PN = 1, one more element driven by the PN bit (the
//     calibration signal CS = (Delta/2)*PN); every element has a fixed
//     random relative error of rms MISMATCH_SIGMA;
//   * residue V_res = V_in - V_dac and a memory-less, weakly nonlinear
//     amplifier V_o = BETA1*V_res + BETA3*V_res^3.
// The random offsets and element errors are drawn once, at time 0, from a
// Gaussian generator seeded with SEED, so a given SEED always gives the same
// stage. On every rising clock edge the model samples vin and pn and
// updates thermo and vo, so a chain of these stages is a pipeline with one
// cycle per stage.
// The kinds of imperfection follow the simulated example converter; the
// default gains are its first stage's, and the defaults of the other
// imperfections are zero (an ideal stage apart from the amplifier). The
// random generator (xorshift32 and Box-Muller) is this model's own choice.
module mdac_stage_model #(
  parameter int  M              = 20,
  parameter bit  HAS_PN         = 1'b1,
  parameter real BETA1          = 7.76,
  parameter real BETA3          = -12.8,
  parameter real OFFSET         = 0.0,
  parameter real OFS_SIGMA      = 0.0,
  parameter real MISMATCH_SIGMA = 0.0,
  parameter real NOISE_RMS      = 0.0,
  parameter int  SEED           = 1
) (
  input  logic         clk,
  input  real          vin,
  input  logic         pn,
  output logic [M-1:0] thermo,
  output real          vo
);

  localparam real DELTA = 2.0 / real'(M);

  real level [M];   // comparator thresholds including offsets
  real elem  [M+1]; // SDAC element sizes; elem[M] is the PN element

  logic [31:0] rng;

  // xorshift32 step, then a uniform number in (0, 1)
  function automatic real next_uniform(ref logic [31:0] s);
    s = s ^ (s << 13);
    s = s ^ (s >> 17);
    s = s ^ (s << 5);
    return (real'(s) + 0.5) / 4294967296.0;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real next_gauss(ref logic [31:0] s);
    real u1, u2;
    u1 = next_uniform(s);
    u2 = next_uniform(s);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    rng = 32'h9E37_79B9 ^ 32'(SEED * 7919 + 1);
    if (rng == 0) rng = 32'h1;
    for (int j = 0; j < M; j++)
      level[j] = -1.0 + DELTA / 2.0 + DELTA * real'(j) + OFFSET +
                 OFS_SIGMA * DELTA * next_gauss(rng);
    for (int j = 0; j <= M; j++)
      elem[j] = (DELTA / 2.0) * (1.0 + MISMATCH_SIGMA * next_gauss(rng));
    thermo = '0;
    vo     = 0.0;
  end

  always @(posedge clk) begin
    real vs, vdac, vres;
    vs   = vin + ((NOISE_RMS != 0.0) ? NOISE_RMS * next_gauss(rng) : 0.0);
    vdac = 0.0;
    for (int j = 0; j < M; j++) begin
      if (vs > level[j]) begin
        thermo[j] <= 1'b1;
        vdac += elem[j];
      end else begin
        thermo[j] <= 1'b0;
        vdac -= elem[j];
      end
    end
    if (HAS_PN) vdac += pn ? elem[M] : -elem[M];
    vres = vs - vdac;
    vo  <= BETA1 * vres + BETA3 * vres * vres * vres;
  end

endmodule
