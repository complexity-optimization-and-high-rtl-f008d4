// fir_mac: the multiply-accumulate datapath of one FIR filter.
//
// At 20 kHz sampling there is ample time to evaluate a filter sequentially,
// so each filter owns a single multiplier: one tap x coefficient product per
// clock is added to the accumulator. `clr` together with `en` starts a new
// sum with the current product. The accumulator has ACC_W bits: 34 product
// bits plus 8 guard bits, enough for the 250 products of a 5-electrode,
// 50-tap filter. The one-multiplier sequential form follows the source
// design; the accumulator width is this design's choice.
// Timing: `acc` holds the sum one clock after the last `en`.
module fir_mac
  import botm_pkg::*;
#(
  parameter int unsigned ACC_W = TAP_W + COEF_W + 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic signed [TAP_W-1:0]  tap,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [ACC_W-1:0]  acc
);
  logic signed [TAP_W+COEF_W-1:0] prod;
  assign prod = tap * coef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (en)   acc <= (clr ? '0 : acc) + ACC_W'(prod);
  end
endmodule
