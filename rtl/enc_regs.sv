// Programmable mode, timing, level and control registers.
//
// All programming happens while the encoder reset rst_n is low, as the
// document prescribes; once rst_n is high the registers are read-only and the
// encoder runs with the programmed values. Words 0 to 7 are the 8 x 24-bit
// register file of the horizontal generator (timing and levels), two 12-bit
// fields per word; words 8 to 12 hold the subcarrier generator's p:q ratio
// counter inputs, its phase adjustment and the mode bits, and word 13 the
// chroma gains of the quadrature modulator.
//
//   addr  bits 23:12        bits 11:0
//   0     HCOUNT            FP
//   1     SY                BR
//   2     BU                CBP
//   3     VA                SL
//   4     SH                EL
//   5     EH                SYNC_LVL
//   6     BLANK_LVL         BLACK_LVL
//   7     Y_GAIN            BURST_AMP (signed 8 bit in 7:0)
//   8     -                 P1 (11 bit)
//   9     P2 (bits 15:0)
//   10    P3 (bits 15:0)
//   11    -                 PHASE_ADJ (11 bit)
//   12    mode: bit 0 PAL_OP, bit 1 RGB_IN, bit 2 PALPLUS
//   13    U_GAIN (19:12)    V_GAIN (7:0)
//
// Interface: synchronous write port (prog_we, prog_addr, prog_data) sampled
// on the rising xclk edge while rst_n is low; cfg is the decoded contents.
// The registers have no reset of their own: they must be written before the
// encoder is released from reset. rst_n is therefore used here as a
// synchronous write qualifier while the other blocks use it as their
// asynchronous reset; this is intended (programming happens only while the
// rest of the encoder is held in reset). The field split of the words is this
// design's choice; the document gives only the register names and the
// 8 x 24-bit size of the timing/level file.
module enc_regs
  import enc_pkg::*;
(
  input  logic        xclk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [3:0]  prog_addr,
  input  logic [23:0] prog_data,
  output cfg_t        cfg
);
  logic [23:0] regs [NREGS];

  always_ff @(posedge xclk)
    if (!rst_n && prog_we && (32'(prog_addr) < NREGS))
      regs[prog_addr] <= prog_data;

  always_comb begin
    cfg.t.hcount   = regs[0][22:12];
    cfg.t.fp       = regs[0][10:0];
    cfg.t.sy       = regs[1][22:12];
    cfg.t.br       = regs[1][10:0];
    cfg.t.bu       = regs[2][22:12];
    cfg.t.cbp      = regs[2][10:0];
    cfg.t.va       = regs[3][22:12];
    cfg.t.sl       = regs[3][10:0];
    cfg.t.sh       = regs[4][22:12];
    cfg.t.el       = regs[4][10:0];
    cfg.t.eh       = regs[5][22:12];
    cfg.l.sync_lvl = regs[5][9:0];
    cfg.l.blank_lvl = regs[6][21:12];
    cfg.l.black_lvl = regs[6][9:0];
    cfg.l.y_gain   = regs[7][19:12];
    cfg.l.burst_amp = regs[7][7:0];
    cfg.l.u_gain   = regs[13][19:12];
    cfg.l.v_gain   = regs[13][7:0];
    cfg.s.p1       = regs[8][10:0];
    cfg.s.p2       = regs[9][15:0];
    cfg.s.p3       = regs[10][15:0];
    cfg.s.phase_adj = regs[11][10:0];
    cfg.m.pal_op   = regs[12][0];
    cfg.m.rgb_in   = regs[12][1];
    cfg.m.palplus  = regs[12][2];
  end
endmodule
