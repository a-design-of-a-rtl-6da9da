// Subcarrier generator (Subgen): p:q ratio counter and quarter-wave ROMs.
//
// Produces the sine and cosine of the colour subcarrier (NTSC 3.579545 MHz,
// PAL 4.43361875 MHz) at any programmed pixel rate. The phase is an 11-bit
// word (2048 = 360 degrees) advanced every pixel clock by p1 + p2/(4*HCOUNT):
//
//   - a modulo-4*HCOUNT register accumulates p2 (or p3) and its registered
//     carry is added into the modulo-2048 phase register together with p1;
//   - for 625/50 operation a modulo-625 register accumulates 67 and its
//     registered carry selects p3 instead of p2 (for 525/60 p2 is always
//     used). With p3 = p2 + 1 this adds the 67/625 of a count that PAL's
//     fsc = (1135/4 + 1/625) fH needs.
//   Examples: NTSC at 13.5 MHz (858 pixels): p1 = 543, p2 = p3 = 104;
//   PAL at 13.5 MHz (864 pixels): p1 = 672, p2 = 2061, p3 = 2062.
//
// The phase is then offset by the programmable phase adjustment, by a
// compensation value (PAL lines with the switch set: 512, otherwise 0) and,
// outside the burst, by the active-video offset: 1024 for NTSC, 768 (switch
// set) or 1280 (switch clear) for PAL. The active-video phase offset is thus
// constant (1024 NTSC, 1280 PAL) while the burst sits 180 deg from the U
// axis in NTSC and at 135 / 225 deg, alternating line by line, in PAL. On
// PAL lines with the switch set the cosine (V axis) is inverted.
//
// The upper two phase bits pick the quadrant, the lower nine address a
// 512 x 7 magnitude ROM holding sin((a + 0.5) * 90 deg / 512) * 127; the
// address is complemented in the quadrants where the wave falls, and the
// quadrant gives the sign. The ROM contents are computed at elaboration.
//
// Interface: xclk, rst_n, ce; pal_op, p1, p2, p3, hcount, phase_adj from the
// registers; line_start (one ce pulse per line, toggles the PAL switch);
// burst (the current pixel is in the burst); sinwt, coswt as sign/magnitude.
// Timing: sinwt/coswt are registered; they reflect the burst input of the
// previous pixel clock. The ratio counter, the ROM folding and the offset
// values follow the document; the exact offset arrangement is this design's.
module subgen
  import enc_pkg::*;
(
  input  logic        xclk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        pal_op,
  input  logic [10:0] p1,
  input  logic [15:0] p2,
  input  logic [15:0] p3,
  input  logic [10:0] hcount,
  input  logic [10:0] phase_adj,
  input  logic        line_start,
  input  logic        burst,
  output sinval_t     sinwt,
  output sinval_t     coswt,
  output logic        pal_sw
);
  typedef logic [6:0] rom_t [512];

  function automatic rom_t gen_rom();
    rom_t r;
    for (int a = 0; a < 512; a++)
      r[a] = 7'($rtoi(127.0 * $sin((real'(a) + 0.5) * 3.14159265358979 / 1024.0) + 0.5));
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  // Ratio counter.
  logic [9:0]  a625;
  logic        sel_p3;
  logic [15:0] afrac;
  logic        cfrac;
  logic [10:0] acc;

  logic [10:0] n625;
  logic [16:0] nfrac;
  logic [16:0] modulus;
  always_comb begin
    n625    = 11'(a625) + 11'd67;
    modulus = {4'b0, hcount, 2'b00};
    nfrac   = 17'(afrac) + 17'(sel_p3 ? p3 : p2);
  end

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      a625 <= '0; sel_p3 <= 1'b0; afrac <= '0; cfrac <= 1'b0; acc <= '0;
      pal_sw <= 1'b0;
    end else if (ce) begin
      if (n625 >= 11'd625) begin
        a625   <= 10'(n625 - 11'd625);
        sel_p3 <= pal_op;
      end else begin
        a625   <= 10'(n625);
        sel_p3 <= 1'b0;
      end
      if (nfrac >= modulus) begin
        afrac <= 16'(nfrac - modulus);
        cfrac <= 1'b1;
      end else begin
        afrac <= 16'(nfrac);
        cfrac <= 1'b0;
      end
      acc <= acc + p1 + 11'(cfrac);
      if (line_start) pal_sw <= pal_op & ~pal_sw;
    end

  // Phase offsets and ROM access.
  logic [10:0] act_off, comp, ph, phc;
  always_comb begin
    if (!pal_op)     act_off = 11'd1024;
    else if (pal_sw) act_off = 11'd768;
    else             act_off = 11'd1280;
    comp = (pal_op && pal_sw) ? 11'd512 : 11'd0;
    ph  = acc + phase_adj + comp + (burst ? 11'd0 : act_off);
    phc = ph + 11'd512;   // cosine = sine advanced by 90 degrees
  end

  function automatic sinval_t lookup(input logic [10:0] p);
    sinval_t s;
    logic [8:0] a;
    a      = p[9] ? ~p[8:0] : p[8:0];
    s.mag  = ROM[a];
    s.sign = p[10];
    return s;
  endfunction

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      sinwt <= '0;
      coswt <= '0;
    end else if (ce) begin
      sinwt <= lookup(ph);
      coswt <= lookup(phc);
      if (pal_op && pal_sw) coswt.sign <= ~lookup(phc).sign;
    end
endmodule
