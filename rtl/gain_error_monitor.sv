// Gain-error magnitude monitor that gates the nonlinearity loop.
//
// Large gain errors bias the nonlinearity detector, so the alpha3 loop only
// runs while the gain loop has settled. The monitor averages IGE over blocks
// of L valid samples, e1_est = (1/L) * sum IGE, and at the end of each block
// sets F = 1 if |e1_est| < E_TH and F = 0 otherwise; F holds its value for the
// whole next block. No division is needed: the block sum is compared with the
// constant ceil(E_TH * L). L and E_TH default to the values of the example
// converter (10^4 and 0.0125). F = 0 after reset, until the first block has
// been measured, is this design's choice.
//
// Interface: ige is sampled when valid is high. window_done pulses for one
// cycle after the sample that closes a block; e1_sum is that block's sum.
module gain_error_monitor
  import adc_cal_pkg::*;
#(
  parameter int  L    = 10000,
  parameter real E_TH = 0.0125
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  err_t ige,
  output logic f,
  output logic window_done,
  output logic signed [$clog2(2*L+1):0] e1_sum
);

  localparam int SW  = $clog2(2 * L + 1) + 1;
  localparam int CNW = $clog2(L);
  localparam logic signed [SW-1:0] LIM = SW'($rtoi($ceil(E_TH * real'(L))));

  logic        [CNW-1:0] cnt;
  logic signed [SW-1:0]  acc, acc_next, mag;

  always_comb begin
    acc_next = acc + SW'(ige);
    mag      = (acc_next < 0) ? -acc_next : acc_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt         <= '0;
      acc         <= '0;
      f           <= 1'b0;
      window_done <= 1'b0;
      e1_sum      <= '0;
    end else begin
      window_done <= 1'b0;
      if (valid) begin
        if (cnt == CNW'(L - 1)) begin
          cnt         <= '0;
          acc         <= '0;
          e1_sum      <= acc_next;
          f           <= (mag < LIM);
          window_done <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

endmodule
