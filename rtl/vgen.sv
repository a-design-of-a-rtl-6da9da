// Vertical sync generator (Vgen).
//
// A 10-bit line counter runs from 1 to 525 (NTSC, pal_op = 0) or 1 to 625
// (PAL, pal_op = 1) and advances at the start of every line. The line number
// is decoded into the type of the current line, which tells hgen what to
// draw: broad pulses, equalising pulses, half lines or a normal line.
//
//   NTSC  1-3 EE, 4-6 VS, 7-9 EE, 10-20 UBB, 21-262 UVV,
//         263 UVE, 264-265 EE, 266 EV, 267-268 VS, 269 VE, 270-271 EE,
//         272 EB, 273-282 UBB, 283 UBV, 284-525 UVV
//   PAL   1-2 VS, 3 VE, 4-5 EE, 6-22 UBB, 23 UBV, 24-310 UVV,
//         311-312 EE, 313 EV, 314-315 VS, 316-317 EE, 318 EB, 319-335 UBB,
//         336-622 UVV, 623 UVE, 624-625 EE
//
// field is 0 in the first (odd) field and 1 in the second.
//
// Interface: xclk, rst_n, ce, pal_op, line_start (one ce pulse on the last
// pixel of a line, from hgen); line_no, ltype, field.
// Timing: the counter moves on the same pixel edge on which hgen's pixel
// counter returns to 0, so the new line type is valid from the first pixel of
// the line. After reset the line number is 1. The PAL transition lines are
// the ones the document lists; the NTSC table is the standard 525/60
// sequence, which shares most of the document's NTSC transition lines.
module vgen
  import enc_pkg::*;
(
  input  logic       xclk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       pal_op,
  input  logic       line_start,
  output logic [9:0] line_no,
  output line_t      ltype,
  output logic       field
);
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) line_no <= 10'd1;
    else if (ce && line_start)
      line_no <= (line_no >= (pal_op ? 10'd625 : 10'd525)) ? 10'd1 : line_no + 10'd1;

  function automatic line_t ntsc_type(input logic [9:0] n);
    if      (n <= 3)   return LT_EE;
    else if (n <= 6)   return LT_VS;
    else if (n <= 9)   return LT_EE;
    else if (n <= 20)  return LT_UBB;
    else if (n <= 262) return LT_UVV;
    else if (n == 263) return LT_UVE;
    else if (n <= 265) return LT_EE;
    else if (n == 266) return LT_EV;
    else if (n <= 268) return LT_VS;
    else if (n == 269) return LT_VE;
    else if (n <= 271) return LT_EE;
    else if (n == 272) return LT_EB;
    else if (n <= 282) return LT_UBB;
    else if (n == 283) return LT_UBV;
    else               return LT_UVV;
  endfunction

  function automatic line_t pal_type(input logic [9:0] n);
    if      (n <= 2)   return LT_VS;
    else if (n == 3)   return LT_VE;
    else if (n <= 5)   return LT_EE;
    else if (n <= 22)  return LT_UBB;
    else if (n == 23)  return LT_UBV;
    else if (n <= 310) return LT_UVV;
    else if (n <= 312) return LT_EE;
    else if (n == 313) return LT_EV;
    else if (n <= 315) return LT_VS;
    else if (n <= 317) return LT_EE;
    else if (n == 318) return LT_EB;
    else if (n <= 335) return LT_UBB;
    else if (n <= 622) return LT_UVV;
    else if (n == 623) return LT_UVE;
    else               return LT_EE;
  endfunction

  always_comb begin
    ltype = pal_op ? pal_type(line_no) : ntsc_type(line_no);
    field = pal_op ? (line_no > 10'd312) : (line_no > 10'd262);
  end
endmodule
