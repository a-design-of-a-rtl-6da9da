// Chroma low pass filter: 5-tap symmetric FIR in pipelined form.
//
// Band-limits one colour difference signal (U or V, signed 8 bit) before the
// quadrature modulator. The impulse response is symmetric, h2 h1 h0 h1 h2,
// so the five taps need only three multipliers: the samples that share a
// coefficient are added first (x[n] + x[n-4], x[n-1] + x[n-3]) and the
// centre sample x[n-2] is multiplied alone. The sum of products is
// registered, then truncated (arithmetic shift right by SHIFT) and
// saturated to 8 bits in a second register.
//
// Default coefficients are the binomial 1 4 6 4 1 response scaled to 128
// (h0 = 48 centre, h1 = 32, h2 = 8), unity gain at DC and a zero at half the
// pixel rate; a softer chroma band limit than a designed 0.5 MHz filter,
// which five taps at 13.5 MHz cannot reach.
//
// Interface: xclk, rst_n, ce (pixel enable), x in, y out (both signed 8 bit).
// Timing: y shows the result for the x sampled at a pixel edge two pixel
// edges later (two clocks of latency), one output per pixel clock. The
// symmetric three-multiplier structure and the two-clock latency follow the
// document; the coefficient values are this design's.
module lpf #(
  parameter int signed H0    = 48,
  parameter int signed H1    = 32,
  parameter int signed H2    = 8,
  parameter int unsigned SHIFT = 7
) (
  input  logic              xclk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic signed [7:0] x,
  output logic signed [7:0] y
);
  logic signed [7:0]  d1, d2, d3, d4;
  logic signed [19:0] acc;

  logic signed [8:0]  a0, a1;
  logic signed [19:0] sum;
  always_comb begin
    a0  = 9'(x) + 9'(d4);
    a1  = 9'(d1) + 9'(d3);
    sum = 20'(a0 * 10'(H2)) + 20'(a1 * 10'(H1)) + 20'(d2 * 10'(H0));
  end

  function automatic logic signed [7:0] sat8(input logic signed [19:0] v);
    if (v > 127)       return 8'sd127;
    else if (v < -128) return -8'sd128;
    else               return 8'(v);
  endfunction

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      d1 <= '0; d2 <= '0; d3 <= '0; d4 <= '0;
      acc <= '0; y <= '0;
    end else if (ce) begin
      d1  <= x;  d2 <= d1; d3 <= d2; d4 <= d3;
      acc <= sum;
      y   <= sat8(acc >>> SHIFT);
    end
endmodule
