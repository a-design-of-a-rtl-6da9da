// Interpolator (INT): 2x upsampler and 16-tap symmetric FIR.
//
// Doubles the sample rate of a luma or chroma signal: the encoder's pixel
// rate (xclk / 2) goes in, the full xclk rate comes out. In every pixel
// period the upsampler feeds the filter the new sample in the first xclk
// cycle (ce = 0) and a zero in the second (ce = 1). The low pass filter has
// 16 taps with a symmetric response h0..h7 h7..h0, so the samples that share
// a coefficient are added first and only eight multipliers are needed.
//
// Default coefficients: a Hamming-windowed sinc with its cutoff midway
// between the 6.5 MHz pass band and the 9.8 MHz stop band at 27 MHz,
// rounded so that the even and the odd taps each sum to 128; every output,
// whether it falls on an input sample or between two, therefore has unity
// gain at DC after the final arithmetic shift by 7. The result is
// saturated to W bits ("truncator").
//
// Interface: xclk, rst_n; ce from clk_div (x is sampled in ce = 0 cycles);
// x, y signed W bit.
// Timing: runs every xclk cycle; the response to an input sample starts
// three xclk cycles after the cycle in which it is taken, and the filter's
// group delay adds 7.5 output samples.
// Zero insertion, 16 taps reduced to 8 multipliers and the 8-bit data
// default follow the document; the coefficient values are this design's.
module interp #(
  parameter int unsigned W = 8,
  parameter int signed H0 = 1,  parameter int signed H1 = 0,
  parameter int signed H2 = -3, parameter int signed H3 = 6,
  parameter int signed H4 = 5,  parameter int signed H5 = -25,
  parameter int signed H6 = 14, parameter int signed H7 = 130,
  parameter int unsigned SHIFT = 7
) (
  input  logic                xclk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam int AW = W + 12;
  localparam int signed H [8] = '{H0, H1, H2, H3, H4, H5, H6, H7};

  logic signed [W-1:0]  d [16];
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < 8; k++)
      sum += (AW'(d[k]) + AW'(d[15-k])) * AW'(H[k]);
  end

  localparam logic signed [AW-1:0] YMAX = AW'((1 <<< (W-1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(1 <<< (W-1));

  logic signed [AW-1:0] scaled;
  assign scaled = acc >>> SHIFT;

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) d[k] <= '0;
      acc <= '0;
      y   <= '0;
    end else begin
      d[0] <= ce ? '0 : x;
      for (int k = 1; k < 16; k++) d[k] <= d[k-1];
      acc <= sum;
      y   <= (scaled > YMAX) ? W'(YMAX) : (scaled < YMIN) ? W'(YMIN) : W'(scaled);
    end
endmodule
