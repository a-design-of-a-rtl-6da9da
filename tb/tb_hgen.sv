// Testbench for hgen: with NTSC 13.5 MHz timing it draws one line of every
// line type and checks the sequence of segments as run lengths (segment,
// number of pixels) written out here from the timing values, plus the line
// length and that line_start comes on the last pixel only.
module tb_hgen;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, ce;
  htiming_t tm;
  line_t ltype = LT_UVV;
  logic [10:0] hcnt;
  seg_t seg;
  logic burst, line_start;
  int checks = 0, failures = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  hgen dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .tm (tm), .ltype (ltype), .hcnt (hcnt),
            .seg (seg), .burst (burst), .line_start (line_start));

  always #5 xclk = ~xclk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pixel_edge();
    do @(posedge xclk); while (ce !== 1'b1);
    #1;
  endtask

  localparam int H = 858, FP = 16, SY = 64, BR = 8, BU = 34, CBP = 16, VA = 720;
  localparam int SL = 16, SH = 382, EL = 16, EH = 47, HALF = H / 2;

  typedef struct { seg_t s; int n; } run_t;

  // expected runs of a line
  function automatic void expect_runs(input line_t lt, ref run_t r [$]);
    r.delete();
    case (lt)
      LT_VS: r = '{'{SEG_BLANK, SL}, '{SEG_SYNC, SH - SL}, '{SEG_BLANK, HALF - SH + SL},
                   '{SEG_SYNC, SH - SL}, '{SEG_BLANK, H - HALF - SH}};
      LT_EE: r = '{'{SEG_BLANK, EL}, '{SEG_SYNC, EH - EL}, '{SEG_BLANK, HALF - EH + EL},
                   '{SEG_SYNC, EH - EL}, '{SEG_BLANK, H - HALF - EH}};
      LT_VE: r = '{'{SEG_BLANK, SL}, '{SEG_SYNC, SH - SL}, '{SEG_BLANK, HALF - SH + EL},
                   '{SEG_SYNC, EH - EL}, '{SEG_BLANK, H - HALF - EH}};
      LT_EV: r = '{'{SEG_BLANK, EL}, '{SEG_SYNC, EH - EL}, '{SEG_BLANK, HALF - EH + SL},
                   '{SEG_SYNC, SH - SL}, '{SEG_BLANK, H - HALF - SH}};
      LT_EB: r = '{'{SEG_BLANK, EL}, '{SEG_SYNC, EH - EL}, '{SEG_BLANK, HALF - EH},
                   '{SEG_BLACK, FP + SY + BR + BU + CBP + VA - HALF}, '{SEG_BLANK, H - (FP + SY + BR + BU + CBP + VA)}};
      LT_UVV: r = '{'{SEG_BLANK, FP}, '{SEG_SYNC, SY}, '{SEG_BLANK, BR}, '{SEG_BURST, BU},
                    '{SEG_BLANK, CBP}, '{SEG_ACTIVE, VA}};
      LT_UBB: r = '{'{SEG_BLANK, FP}, '{SEG_SYNC, SY}, '{SEG_BLANK, BR}, '{SEG_BURST, BU},
                    '{SEG_BLANK, CBP}, '{SEG_BLACK, VA}};
      LT_UVE: r = '{'{SEG_BLANK, FP}, '{SEG_SYNC, SY}, '{SEG_BLANK, BR}, '{SEG_BURST, BU},
                    '{SEG_BLANK, CBP}, '{SEG_ACTIVE, HALF - (FP + SY + BR + BU + CBP)},
                    '{SEG_BLANK, EL}, '{SEG_SYNC, EH - EL}, '{SEG_BLANK, H - HALF - EH}};
      LT_UBV: r = '{'{SEG_BLANK, FP}, '{SEG_SYNC, SY}, '{SEG_BLANK, BR}, '{SEG_BURST, BU},
                    '{SEG_BLANK, CBP}, '{SEG_BLACK, HALF - (FP + SY + BR + BU + CBP)},
                    '{SEG_ACTIVE, FP + SY + BR + BU + CBP + VA - HALF}};
      default: ;
    endcase
  endfunction

  line_t all_types [9] = '{LT_VS, LT_VE, LT_EE, LT_EV, LT_EB, LT_UVV, LT_UBB, LT_UVE, LT_UBV};

  initial begin
    run_t r [$];
    seg_t got [$];
    int nls;
    tm = '{hcount: 11'(H), fp: 11'(FP), sy: 11'(SY), br: 11'(BR), bu: 11'(BU), cbp: 11'(CBP),
           va: 11'(VA), sl: 11'(SL), sh: 11'(SH), el: 11'(EL), eh: 11'(EH)};
    repeat (3) @(posedge xclk);
    rst_n = 1'b1;
    foreach (all_types[t]) begin
      ltype = all_types[t];
      // run to the end of the current line
      while (!line_start) pixel_edge();
      pixel_edge();        // hcnt = 0 now, seg still from the old line
      got.delete();
      nls = 0;
      for (int p = 0; p < H; p++) begin
        if (line_start && p != H - 1) nls++;
        pixel_edge();      // seg now describes pixel p
        got.push_back(seg);
        checks++;
        if (burst != (seg == SEG_BURST)) failures++;
      end
      checks++;
      if (nls != 0 || hcnt != 0) begin
        failures++; $display("line length / line_start wrong");
      end
      expect_runs(all_types[t], r);
      begin
        int idx;
        idx = 0;
        foreach (r[k]) for (int j = 0; j < r[k].n; j++) begin
          checks++;
          if (idx >= H || got[idx] != r[k].s) begin
            failures++;
            if (failures < 10) $display("%s pixel %0d: %s expected %s", all_types[t].name(), idx,
                                        idx < H ? got[idx].name() : "-", r[k].s.name());
          end
          idx++;
        end
        for (; idx < H; idx++) begin
          checks++;
          if (got[idx] != SEG_BLANK) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
