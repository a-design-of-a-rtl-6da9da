// Insert: builds the luma signal from luminance and sync levels.
//
// For each pixel the segment from hgen selects the output code: the sync
// tip level, the blanking level (also during the burst), the black level
// in the picture window of a black line, or, in the picture window of an
// active line, the luminance mapped onto the output scale:
//
//   luma = black_lvl + ((Y - 16) * y_gain) / 64, clamped to 0..1023
//
// so that Y = 16 gives black and, with y_gain chosen for the standard,
// Y = 235 gives the white level.
//
// Interface: xclk, rst_n, ce; seg; y (8 bit); levels from the registers;
// luma (10 bit unsigned).
// Timing: one pixel clock of latency. Mixing levels with luminance by segment
// follows the document; the level codes and the gain form are this design's.
module insert
  import enc_pkg::*;
(
  input  logic       xclk,
  input  logic       rst_n,
  input  logic       ce,
  input  seg_t       seg,
  input  logic [7:0] y,
  input  levels_t    lv,
  output logic [9:0] luma
);
  logic signed [19:0] v;
  logic [9:0]         nxt;
  always_comb begin
    v = 20'($signed({1'b0, lv.black_lvl}))
      + ((20'($signed({1'b0, y})) - 20'sd16) * 20'($signed({1'b0, lv.y_gain})) >>> 6);
    unique case (seg)
      SEG_SYNC:   nxt = lv.sync_lvl;
      SEG_BLACK:  nxt = lv.black_lvl;
      SEG_ACTIVE: nxt = (v < 0) ? 10'd0 : (v > 1023) ? 10'd1023 : 10'(v);
      default:    nxt = lv.blank_lvl;
    endcase
  end

  always_ff @(posedge xclk or negedge rst_n)
    if (!rst_n)  luma <= '0;
    else if (ce) luma <= nxt;
endmodule
