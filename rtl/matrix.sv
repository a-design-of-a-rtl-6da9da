// Colour converter (Matrix): gamma corrected R'G'B' to Y'CbCr (CCIR-601).
//
// Rather than nine multipliers, the matrix has one multiplier per input
// component and commutates their coefficients: within one pixel period the
// three multipliers are used three times, once with the V (Cr) row, once with
// the U (Cb) row and once with the Y row of the coefficient matrix, and the
// three sums of products are captured on alternate edges of the external
// clock xclk. The pixel period (clk = xclk / 2) is four xclk half-periods
// H0..H3, counted from the rising xclk edge that is a pixel edge:
//
//   H0 (xclk high, ce = 0)  V row   captured on the falling xclk edge
//   H1 (xclk low,  ce = 0)  U row   captured on the rising xclk edge
//   H2 (xclk high, ce = 1)  Y row   captured on the falling xclk edge
//   H3 (xclk low,  ce = 1)  idle;   Y, U, V registered on the next pixel edge
//
// The half-period is identified without using xclk as data: qn is ce sampled
// on the falling edge of xclk, and {ce, qn} is 01, 00, 10, 11 in H0..H3.
// Coefficients are the CCIR-601 ones for 8-bit R'G'B' (0..255) scaled by
// 256: Y = 16 + (66R + 129G + 25B)/256, Cb = 128 + (-38R - 74G + 112B)/256,
// Cr = 128 + (112R - 94G - 18B)/256, rounded and clamped to 0..255.
// With bypass high the inputs are already Y, Cb, Cr and pass through with
// the same one-pixel latency.
//
// Interface: xclk, rst_n, ce from clk_div; in0..in2 = R/Y, G/Cb, B/Cr, which
// must be stable for the whole pixel period (they come from registers
// updated on pixel edges); y, cb, cr outputs, registered on the pixel edge.
// Timing: one pixel clock of latency, one result per pixel clock.
// The commutated structure and the capture edges follow the document; the
// coefficient values (rounded CCIR-601) are this design's choice.
module matrix #(
  parameter int signed A11 = 66,  parameter int signed A12 = 129, parameter int signed A13 = 25,
  parameter int signed A21 = -38, parameter int signed A22 = -74, parameter int signed A23 = 112,
  parameter int signed A31 = 112, parameter int signed A32 = -94, parameter int signed A33 = -18
) (
  input  logic       xclk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       bypass,
  input  logic [7:0] in0,
  input  logic [7:0] in1,
  input  logic [7:0] in2,
  output logic [7:0] y,
  output logic [7:0] cb,
  output logic [7:0] cr
);
  logic qn;
  always_ff @(negedge xclk or negedge rst_n)
    if (!rst_n) qn <= 1'b1;
    else        qn <= ce;

  // Coefficient multiplexers, one per multiplier.
  logic signed [9:0] k0, k1, k2;
  always_comb begin
    unique case ({ce, qn})
      2'b01:   begin k0 = 10'(A31); k1 = 10'(A32); k2 = 10'(A33); end  // V row
      2'b00:   begin k0 = 10'(A21); k1 = 10'(A22); k2 = 10'(A23); end  // U row
      default: begin k0 = 10'(A11); k1 = 10'(A12); k2 = 10'(A13); end  // Y row
    endcase
  end

  // Three multipliers and the adder that sums their products.
  logic signed [19:0] sum;
  always_comb
    sum = 20'(k0 * $signed({1'b0, in0})) + 20'(k1 * $signed({1'b0, in1}))
        + 20'(k2 * $signed({1'b0, in2}));

  logic signed [19:0] v_p, u_p, y_p;

  always_ff @(negedge xclk or negedge rst_n)
    if (!rst_n) begin
      v_p <= '0;
      y_p <= '0;
    end else begin
      if (!ce && qn) v_p <= sum;   // end of H0
      if (ce && !qn) y_p <= sum;   // end of H2
    end

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) u_p <= '0;
    else if (!ce) u_p <= sum;      // end of H1

  function automatic logic [7:0] scale(input logic signed [19:0] p, input logic signed [19:0] off);
    logic signed [19:0] r;
    r = (p + 20'sd128) >>> 8;
    r = r + off;
    if (r < 0)        return 8'd0;
    else if (r > 255) return 8'd255;
    else              return 8'(r);
  endfunction

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      y <= 8'd16; cb <= 8'd128; cr <= 8'd128;
    end else if (ce) begin
      if (bypass) begin
        y <= in0; cb <= in1; cr <= in2;
      end else begin
        y  <= scale(y_p, 16);
        cb <= scale(u_p, 128);
        cr <= scale(v_p, 128);
      end
    end
endmodule
