// Horizontal sync generator (Hgen).
//
// An 11-bit pixel counter runs from 0 to HCOUNT-1. From the programmed
// timing registers and the line type supplied by vgen it decides, pixel by
// pixel, which segment of the composite signal is being drawn:
//
//   normal line  [0, FP) blank, [.., +SY) sync, [.., +BR) breezeway blank,
//                [.., +BU) burst, [.., +CBP) back porch blank,
//                [.., +VA) picture (video or black), rest blank
//   broad pulse half line      sync for SL <= p < SH, else blank
//   equalising half line       sync for EL <= p < EH, else blank
//
// where p is the position within the half line (the second half starts at
// HCOUNT/2). Half-and-half lines (VE, EV, EB, UVE, UBV) take each half from
// the corresponding full line type; in UVE the picture ends, and in UBV it
// starts, at the half line.
//
// Interface: xclk, rst_n, ce, timing registers, ltype from vgen; hcnt, the
// registered segment seg, burst (seg == SEG_BURST) and line_start, high on
// the last pixel of a line (for vgen and the subcarrier generator).
// Timing: seg and burst are registered: they describe the pixel whose count
// hcnt showed one pixel clock earlier. The segment order and the register
// names follow the document; reading SL/SH and EL/EH as the falling and
// rising pulse positions within a half line is this design's choice.
module hgen
  import enc_pkg::*;
(
  input  logic        xclk,
  input  logic        rst_n,
  input  logic        ce,
  input  htiming_t    tm,
  input  line_t       ltype,
  output logic [10:0] hcnt,
  output seg_t        seg,
  output logic        burst,
  output logic        line_start
);
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n)  hcnt <= '0;
    else if (ce) hcnt <= line_start ? '0 : hcnt + 11'd1;

  assign line_start = (hcnt >= tm.hcount - 11'd1);

  logic [10:0] half, p;
  logic        first;
  logic [11:0] b1, b2, b3, b4, b5, b6;
  seg_t        s_norm, s_vs, s_eq, s_next;
  logic        in_pic;

  always_comb begin
    half  = tm.hcount >> 1;
    first = hcnt < half;
    p     = first ? hcnt : hcnt - half;
    b1 = 12'(tm.fp);
    b2 = b1 + 12'(tm.sy);
    b3 = b2 + 12'(tm.br);
    b4 = b3 + 12'(tm.bu);
    b5 = b4 + 12'(tm.cbp);
    b6 = b5 + 12'(tm.va);
    in_pic = (12'(hcnt) >= b5) && (12'(hcnt) < b6);

    if      (12'(hcnt) < b1) s_norm = SEG_BLANK;
    else if (12'(hcnt) < b2) s_norm = SEG_SYNC;
    else if (12'(hcnt) < b3) s_norm = SEG_BLANK;
    else if (12'(hcnt) < b4) s_norm = SEG_BURST;
    else if (12'(hcnt) < b5) s_norm = SEG_BLANK;
    else if (in_pic)         s_norm = SEG_BLACK;
    else                     s_norm = SEG_BLANK;

    s_vs = (p >= tm.sl && p < tm.sh) ? SEG_SYNC : SEG_BLANK;
    s_eq = (p >= tm.el && p < tm.eh) ? SEG_SYNC : SEG_BLANK;

    unique case (ltype)
      LT_VS:   s_next = s_vs;
      LT_VE:   s_next = first ? s_vs : s_eq;
      LT_EE:   s_next = s_eq;
      LT_EV:   s_next = first ? s_eq : s_vs;
      LT_EB:   s_next = first ? s_eq : s_norm;
      LT_UVV:  s_next = in_pic ? SEG_ACTIVE : s_norm;
      LT_UBB:  s_next = s_norm;
      LT_UVE:  s_next = first ? (in_pic ? SEG_ACTIVE : s_norm) : s_eq;
      LT_UBV:  s_next = (!first && in_pic) ? SEG_ACTIVE : s_norm;
      default: s_next = SEG_BLANK;
    endcase
  end

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      seg   <= SEG_BLANK;
      burst <= 1'b0;
    end else if (ce) begin
      seg   <= s_next;
      burst <= (s_next == SEG_BURST);
    end
endmodule
