// Periodic pseudorandom-noise generator for the calibration signal.
//
// A degree-DEG Fibonacci linear-feedback shift register (default degree 10,
// the degree used for the example converter) produces one bit per enabled
// clock. The bit is read as the two-level sequence PN: pn = 1 means PN = +1,
// pn = 0 means PN = -1. With a primitive feedback polynomial the period is
// 2^DEG - 1 and the two values are almost equally likely, approximating the
// zero-mean sequence with P(PN=+1) = P(PN=-1) = 1/2 that the calibration
// assumes. The polynomial and seed are this design's choice (default
// x^10 + x^7 + 1); a second generator in the same converter uses a different
// polynomial so the two stages see unrelated sequences.
//
// Interface: en advances the register; pn is the current value, registered.
// Reset (active-low, synchronous) loads SEED, which must be non-zero.
module pn_gen #(
  parameter int               DEG  = 10,
  parameter logic [DEG-1:0]   TAPS = 10'b10_0100_0000,  // x^10 + x^7 + 1
  parameter logic [DEG-1:0]   SEED = 10'h2A5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic pn
);

  logic [DEG-1:0] state;
  logic           fb;

  // Feedback is the XOR of the tapped bits.
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[DEG-2:0], fb};
  end

  assign pn = state[DEG-1];

  initial assert (SEED != '0) else $error("pn_gen: SEED must be non-zero");

endmodule
