// Internal clock divider.
//
// The encoder is fed with an external clock xclk (20-30 MHz) and runs its
// pixel pipeline at half that rate. Instead of a second clock net this design
// produces a pixel-clock enable: ce toggles on every rising edge of xclk, so
// it is high in every second xclk cycle and the rising xclk edge that ends a
// cycle with ce = 1 is a rising edge of the internal clock clk = xclk / 2.
// Every pixel-rate register in the encoder is clocked by xclk and enabled by
// ce; the interpolators run at the full xclk rate (twice the pixel rate).
//
// Interface: xclk, asynchronous active-low rst_n; ce (pixel enable) and clk,
// the divided clock level (the same register as ce, brought out under the
// name the document uses).
// Timing: after reset ce is 0 in the first xclk cycle and 1 in the second.
// The division by two follows the document; using an enable instead of a
// derived clock is this design's choice.
module clk_div (
  input  logic xclk,
  input  logic rst_n,
  output logic ce,
  output logic clk
);
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) ce <= 1'b0;
    else        ce <= ~ce;

  assign clk = ce;
endmodule
