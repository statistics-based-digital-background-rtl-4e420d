// Behavioural model (not synthesizable) of the 2-bit flash ADC that ends the
// pipeline. M comparators (default 3) with reference levels equally spaced
// in [-1, +1] at -1 + Delta/2 + j*Delta, Delta = 2/M, each shifted by a
// common OFFSET and by a fixed random offset of rms OFS_SIGMA*Delta, drawn
// once at time 0 from a Gaussian generator seeded with SEED. On every rising
// clock edge the input is compared and the thermometer word thermo
// (1 = above the level) is registered.
// Random flash offsets are part of the simulated example converter; their
// scale (a fraction of the flash step) and the generator are this model's
// choice. The default is an ideal flash.
module flash_adc_model #(
  parameter int  M         = 3,
  parameter real OFFSET    = 0.0,
  parameter real OFS_SIGMA = 0.0,
  parameter int  SEED      = 1
) (
  input  logic         clk,
  input  real          vin,
  output logic [M-1:0] thermo
);

  localparam real DELTA = 2.0 / real'(M);

  real level [M];

  function automatic real next_uniform(ref logic [31:0] s);
    s = s ^ (s << 13);
    s = s ^ (s >> 17);
    s = s ^ (s << 5);
    return (real'(s) + 0.5) / 4294967296.0;
  endfunction

  initial begin
    logic [31:0] rng;
    real u1, u2;
    rng = 32'h9E37_79B9 ^ 32'(SEED * 7919 + 1);
    if (rng == 0) rng = 32'h1;
    for (int j = 0; j < M; j++) begin
      u1 = next_uniform(rng);
      u2 = next_uniform(rng);
      level[j] = -1.0 + DELTA / 2.0 + DELTA * real'(j) + OFFSET +
                 OFS_SIGMA * DELTA * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
    end
    thermo = '0;
  end

  always @(posedge clk) begin
    for (int j = 0; j < M; j++)
      thermo[j] <= (vin > level[j]);
  end

endmodule
