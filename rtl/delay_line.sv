// Fixed-length shift register used to time-align the stage decisions of a
// pipelined converter: stage i resolves sample n i clock cycles after the
// first stage, so earlier stages' words are delayed until the last stage's
// word of the same sample is available. DEPTH = 0 is a plain wire.
//
// Interface: d enters on every clock; q is d delayed by DEPTH cycles.
// Reset (active-low, synchronous) clears the register contents.
module delay_line #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [WIDTH-1:0] sr [DEPTH];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end

    assign q = sr[DEPTH-1];
  end

endmodule
