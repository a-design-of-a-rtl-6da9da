// Quadrature modulator (Quad_mod).
//
// Modulates the band-limited colour difference signals onto the subcarrier:
//   chroma = ((U * sin)[15:8] * U_GAIN + (V * cos)[15:8] * V_GAIN) / 16
// with U, V signed 8 bit (Cb - 128, Cr - 128), the sine and cosine as signed
// values of the ROM's sign/magnitude samples (amplitude 127) and the result
// rounded toward minus infinity and saturated to signed 11 bit, the scale of
// the 10-bit outputs. During the colour burst U is replaced by the burst
// amplitude and V by 0, so the chroma output carries the burst at the phase
// chosen by the subcarrier generator.
//
// The two gains turn the colour difference signals into the U and V axes
// of the composite signal: U = 0.492 (B'-Y') and V = 0.877 (R'-Y') scale
// Cb and Cr differently (by 0.852 and 1.202 relative to the luma scale), so
// one common gain would give wrong hues. With luma gain g (codes per Y step)
// U_GAIN = 27.5 g and V_GAIN = 38.8 g (NTSC 13.5 MHz: 76 and 108; PAL: 66
// and 93).
//
// Interface: xclk, rst_n, ce; u, v (signed 8 bit, from the LPFs); burst;
// burst_amp (signed 8 bit), u_gain, v_gain (unsigned 8 bit), all
// programmable; sinwt, coswt (from subgen); chroma (signed 11 bit).
// Timing: one pixel clock of latency (chroma registered).
// The two multipliers, their [15:8] product slices and the burst
// multiplexers follow the document;
// feeding a programmable burst amplitude where the document feeds a unit
// value, and the two output gains, are this design's choice.
module quad_mod
  import enc_pkg::*;
(
  input  logic              xclk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic signed [7:0] u,
  input  logic signed [7:0] v,
  input  logic              burst,
  input  logic signed [7:0] burst_amp,
  input  logic [7:0]        u_gain,
  input  logic [7:0]        v_gain,
  input  sinval_t           sinwt,
  input  sinval_t           coswt,
  output logic signed [10:0] chroma
);
  function automatic logic signed [7:0] to_signed(input sinval_t s);
    return s.sign ? -$signed({1'b0, s.mag}) : $signed({1'b0, s.mag});
  endfunction

  logic signed [7:0]  mu, mv;
  logic signed [15:0] pu, pv;
  logic signed [17:0] sum, q;
  always_comb begin
    mu = burst ? burst_amp : u;
    mv = burst ? 8'sd0 : v;
    pu = mu * to_signed(sinwt);
    pv = mv * to_signed(coswt);
    sum = 18'($signed(pu[15:8]) * $signed({1'b0, u_gain}))
        + 18'($signed(pv[15:8]) * $signed({1'b0, v_gain}));
    q = sum >>> 4;
  end

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n)  chroma <= '0;
    else if (ce) chroma <= (q > 18'sd1023) ? 11'sd1023 : (q < -18'sd1024) ? -11'sd1024 : 11'(q);
endmodule
