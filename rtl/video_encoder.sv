// Multistandard digital video encoder: NTSC, PAL and PALplus.
//
// Takes component video (gamma corrected R'G'B' or Y'CbCr, 8 bit per
// component) and produces S-video luma and chroma and the composite signal
// (luma + chroma), all as 10-bit codes at twice the pixel rate.
//
//   pixel input -> Matrix (R'G'B' -> YCbCr, or bypass)
//     Cb, Cr -> two chroma LPFs -> Quad_mod (x sin / cos from Subgen) -> INT
//     Y      -> delay to match the LPFs -> Insert (sync/blank/black levels
//               by the segment from Hgen/Vgen) -> INT
//   composite = interpolated luma + interpolated chroma
//
// For PALplus the letter-box converter, on its own clock lb_clk, decimates
// 16:9 lines 4:3 vertically and writes them to an external frame memory
// (fm_* ports); the frame memory's read data is then presented on the pixel
// input like any other picture. A helper pixel (helper_in, PALplus only) is
// luminance only: it skips the matrix and the chroma path and goes straight
// to Insert.
//
// Clocking: xclk is the external clock; the pixel pipeline runs at xclk / 2
// through the enable pix_ce (clk_div); the interpolators and the outputs run
// at the xclk rate. clk_div's divided clock output is left open: inside,
// every pixel-rate register uses xclk with the enable instead. The PAL
// switch of the subcarrier generator is internal and not brought out. Programming: with rst_n low, write the registers of
// enc_regs through prog_we / prog_addr / prog_data; release rst_n to start.
//
// Timing: a pixel sampled on the pixel edge at which hcnt becomes h reaches
// Insert together with the segment Hgen computed for count h + 3, so a
// source should present the pixel for position h when hcnt shows h - 3 (the
// outputs are aligned to Hgen's timing). From the input pixel edge to the
// first interpolated output sample is 5 pixel clocks plus 3 xclk cycles,
// then the interpolators' 7.5-sample group delay. One result per xclk cycle.
// Chroma is forced to zero outside the picture window (except for the
// burst); the chroma output is offset binary (512 = no colour); the
// modulator's programmable U and V gains set its scale.
// The block structure follows the document; the pipeline alignment, the
// output scaling and the port arrangement are this design's.
module video_encoder
  import enc_pkg::*;
#(
  parameter int unsigned LB_LINE_PIXELS = 1152,
  parameter int unsigned FM_AW          = 20
) (
  input  logic             xclk,
  input  logic             rst_n,
  // register programming (while rst_n is low)
  input  logic             prog_we,
  input  logic [3:0]       prog_addr,
  input  logic [23:0]      prog_data,
  // pixel input: R'/Y, G'/Cb, B'/Cr
  input  logic [7:0]       pix0,
  input  logic [7:0]       pix1,
  input  logic [7:0]       pix2,
  input  logic             helper_in,
  // letter-box converter (PALplus), own clock
  input  logic             lb_clk,
  input  logic             lb_rst_n,
  input  logic             lb_line_start,
  input  logic             lb_field_start,
  input  logic             lb_field_id,
  input  logic             lb_progressive,
  input  logic             lb_helper_en,
  input  logic             lb_valid,
  input  logic [23:0]      lb_din,
  // external frame memory write port
  output logic             fm_wr,
  output logic [FM_AW-1:0] fm_addr,
  output logic [23:0]      fm_data,
  output logic             fm_helper,
  // timing
  output logic             pix_ce,
  output logic [10:0]      hcnt,
  output logic [9:0]       line_no,
  output logic             field,
  output seg_t             seg,
  // video outputs (xclk rate)
  output logic [9:0]       luma,
  output logic [9:0]       chroma,
  output logic [9:0]       composite
);
  logic ce;
  cfg_t cfg;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  assign pix_ce = ce;

  enc_regs u_regs (
    .xclk (xclk), .rst_n (rst_n), .prog_we (prog_we), .prog_addr (prog_addr),
    .prog_data (prog_data), .cfg (cfg)
  );

  // Letter-box converter.
  letterbox #(.LINE_PIXELS (LB_LINE_PIXELS), .AW (FM_AW)) u_lb (
    .clk (lb_clk), .rst_n (lb_rst_n), .line_start (lb_line_start),
    .field_start (lb_field_start), .field_id (lb_field_id),
    .progressive (lb_progressive), .helper_en (lb_helper_en),
    .valid (lb_valid && cfg.m.palplus), .din (lb_din),
    .fm_wr (fm_wr), .fm_addr (fm_addr), .fm_data (fm_data), .fm_helper (fm_helper)
  );

  // Input registers.
  logic [7:0] in0, in1, in2, y_raw;
  logic       help_q, help_d;
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      in0 <= '0; in1 <= '0; in2 <= '0; y_raw <= '0;
      help_q <= 1'b0; help_d <= 1'b0;
    end else if (ce) begin
      in0 <= pix0; in1 <= pix1; in2 <= pix2;
      help_q <= helper_in && cfg.m.palplus;
      y_raw  <= in0;
      help_d <= help_q;
    end

  // Matrix.
  logic [7:0] my, mcb, mcr;
  matrix u_matrix (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .bypass (!cfg.m.rgb_in),
    .in0 (in0), .in1 (in1), .in2 (in2), .y (my), .cb (mcb), .cr (mcr)
  );

  logic [7:0]        ysel;
  logic signed [7:0] u_in, v_in;
  always_comb begin
    ysel = help_d ? y_raw : my;
    u_in = help_d ? 8'sd0 : $signed(mcb ^ 8'h80);   // Cb - 128
    v_in = help_d ? 8'sd0 : $signed(mcr ^ 8'h80);   // Cr - 128
  end

  // Chroma low pass filters.
  logic signed [7:0] u_lpf, v_lpf;
  lpf u_lpf_u (.xclk (xclk), .rst_n (rst_n), .ce (ce), .x (u_in), .y (u_lpf));
  lpf u_lpf_v (.xclk (xclk), .rst_n (rst_n), .ce (ce), .x (v_in), .y (v_lpf));

  // Luminance delay matching the LPFs.
  logic [7:0] yd1, yd2;
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      yd1 <= '0; yd2 <= '0;
    end else if (ce) begin
      yd1 <= ysel; yd2 <= yd1;
    end

  // Sync generators.
  line_t       ltype;
  logic        burst, line_start;
  seg_t        seg_h;
  hgen u_hgen (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .tm (cfg.t), .ltype (ltype),
    .hcnt (hcnt), .seg (seg_h), .burst (burst), .line_start (line_start)
  );
  vgen u_vgen (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .pal_op (cfg.m.pal_op),
    .line_start (line_start), .line_no (line_no), .ltype (ltype), .field (field)
  );
  assign seg = seg_h;

  seg_t seg_d;
  logic burst_d;
  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      seg_d <= SEG_BLANK; burst_d <= 1'b0;
    end else if (ce) begin
      seg_d <= seg_h; burst_d <= burst;
    end

  // Subcarrier generator and quadrature modulator.
  sinval_t sinwt, coswt;
  logic    pal_sw;
  subgen u_subgen (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .pal_op (cfg.m.pal_op),
    .p1 (cfg.s.p1), .p2 (cfg.s.p2), .p3 (cfg.s.p3), .hcount (cfg.t.hcount),
    .phase_adj (cfg.s.phase_adj), .line_start (line_start), .burst (burst),
    .sinwt (sinwt), .coswt (coswt), .pal_sw (pal_sw)
  );

  logic              pic;
  logic signed [10:0] c11;
  assign pic = (seg_d == SEG_ACTIVE);
  quad_mod u_qmod (
    .xclk (xclk), .rst_n (rst_n), .ce (ce),
    .u (pic ? u_lpf : 8'sd0), .v (pic ? v_lpf : 8'sd0),
    .burst (burst_d), .burst_amp (cfg.l.burst_amp),
    .u_gain (cfg.l.u_gain), .v_gain (cfg.l.v_gain),
    .sinwt (sinwt), .coswt (coswt), .chroma (c11)
  );

  // Insert.
  logic [9:0] luma_p;
  insert u_insert (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .seg (seg_d), .y (yd2),
    .lv (cfg.l), .luma (luma_p)
  );

  // Interpolators (xclk rate).
  logic signed [10:0] luma_i, chroma_i;
  interp #(.W (11)) u_int_y (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .x ($signed({1'b0, luma_p})), .y (luma_i)
  );
  interp #(.W (11)) u_int_c (
    .xclk (xclk), .rst_n (rst_n), .ce (ce), .x (c11), .y (chroma_i)
  );

  function automatic logic [9:0] clamp10(input logic signed [12:0] v);
    if (v < 0)         return 10'd0;
    else if (v > 1023) return 10'd1023;
    else               return 10'(v);
  endfunction

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n) begin
      luma <= '0; chroma <= 10'd512; composite <= '0;
    end else begin
      luma      <= clamp10(13'(luma_i));
      chroma    <= clamp10(13'(chroma_i) + 13'sd512);
      composite <= clamp10(13'(luma_i) + 13'(chroma_i));
    end
endmodule
