// Shared types and constants of the NTSC/PAL/PALplus video encoder.
//
// Line types are the ones the vertical generator (vgen) decodes from the line
// number and the horizontal generator (hgen) turns into per-pixel segments:
// broad (vertical sync) pulses, equalising pulses, black-burst lines and
// active lines, plus the four half-and-half lines that occur around the
// vertical interval. The configuration structs mirror the programmable
// register map of enc_regs: horizontal timing, output levels, the p:q ratio
// counter inputs of the subcarrier generator and the mode bits.
package enc_pkg;

  // Line types produced by vgen (one per scan line).
  typedef enum logic [3:0] {
    LT_VS  = 4'd0,  // vertical sync line: two broad pulses
    LT_VE  = 4'd1,  // first half broad pulse, second half equalising pulse
    LT_EE  = 4'd2,  // equalising line: two equalising pulses
    LT_EV  = 4'd3,  // first half equalising, second half broad pulse
    LT_EB  = 4'd4,  // first half equalising, second half black
    LT_UVV = 4'd5,  // active video line
    LT_UBB = 4'd6,  // black burst line (sync + burst, black picture)
    LT_UVE = 4'd7,  // first half active video, second half equalising
    LT_UBV = 4'd8   // first half black burst, second half active video
  } line_t;

  // Per-pixel segment produced by hgen and consumed by insert / quad_mod.
  typedef enum logic [2:0] {
    SEG_BLANK  = 3'd0,  // blanking level (front porch, breezeway, back porch)
    SEG_SYNC   = 3'd1,  // sync tip
    SEG_BURST  = 3'd2,  // blanking level on luma, colour burst on chroma
    SEG_BLACK  = 3'd3,  // picture window of a black line
    SEG_ACTIVE = 3'd4   // picture window carrying video
  } seg_t;

  // Horizontal timing (hgen), all in pixel clocks, 11-bit like the counter.
  typedef struct packed {
    logic [10:0] hcount;  // total pixels per line
    logic [10:0] fp;      // front porch length
    logic [10:0] sy;      // horizontal sync length
    logic [10:0] br;      // breezeway length
    logic [10:0] bu;      // burst length
    logic [10:0] cbp;     // colour back porch length
    logic [10:0] va;      // active video length
    logic [10:0] sl;      // broad pulse: position (in a half line) where sync goes low
    logic [10:0] sh;      // broad pulse: position where sync returns high
    logic [10:0] el;      // equalising pulse: position where sync goes low
    logic [10:0] eh;      // equalising pulse: position where sync returns high
  } htiming_t;

  // Output levels (insert, quad_mod).
  typedef struct packed {
    logic [9:0]        sync_lvl;   // sync tip code
    logic [9:0]        blank_lvl;  // blanking code
    logic [9:0]        black_lvl;  // black (Y = 16) code
    logic [7:0]        y_gain;     // luma gain, unsigned, 2.6 fixed point
    logic signed [7:0] burst_amp;  // value fed to the U multiplier during burst
    logic [7:0]        u_gain;     // chroma gain of the U (Cb) product, /4096
    logic [7:0]        v_gain;     // chroma gain of the V (Cr) product, /4096
  } levels_t;

  // Subcarrier generator programming (p:q ratio counter).
  typedef struct packed {
    logic [10:0] p1;         // integer phase increment per pixel (2048 = 360 deg)
    logic [15:0] p2;         // fraction numerator, modulo 4*hcount
    logic [15:0] p3;         // alternative fraction numerator (625/50 only)
    logic [10:0] phase_adj;  // subcarrier phase adjustment
  } subcfg_t;

  typedef struct packed {
    logic palplus;  // letter-box converter enabled, helper lines allowed
    logic rgb_in;   // input is gamma corrected R'G'B' (matrix active)
    logic pal_op;   // 1: 625/50 PAL timing, 0: 525/60 NTSC timing
  } mode_t;

  typedef struct packed {
    htiming_t t;
    levels_t  l;
    subcfg_t  s;
    mode_t    m;
  } cfg_t;

  // Sine/cosine sample as read from the quarter-wave ROM: sign + magnitude.
  typedef struct packed {
    logic       sign;
    logic [6:0] mag;
  } sinval_t;

  // Register map of enc_regs (24-bit words).
  localparam int unsigned NREGS = 14;

endpackage
