// End-to-end testbench of the video encoder at its default parameters.
//
// Six runs, each programmed through the register port while reset is low:
//  1. NTSC, 13.5 MHz, R'G'B' colour bars, one complete frame (525 lines);
//  2. NTSC with Y'CbCr input (matrix bypassed), a few lines;
//  3. PAL, 13.5 MHz, R'G'B' colour bars, one complete frame (625 lines);
//  4. NTSC at 12.27 MHz (780 pixels per line), one complete frame;
//  5. PAL at 14.75 MHz (944 pixels per line), one complete frame;
//  6. PALplus: helper lines (luminance only) on the pixel input and
//     16:9 lines through the letter-box converter into the frame memory port.
// Checked on the outputs: luma level of every colour bar (computed here
// from the R'G'B' values with the CCIR-601 equations and the programmed
// gain), no chroma on grey bars, chroma and burst amplitudes, sync tip and
// blanking levels, composite = luma + chroma offset, broad pulses on the
// vertical sync lines, line counts per frame, the PAL switch, the helper
// path and the decimated frame memory data. The burst on every line is
// correlated with an ideal subcarrier (3.579545 MHz NTSC, 4.43361875 MHz
// PAL) that runs from reset: its phase must stay constant over the whole
// frame (NTSC) or take two values 90 degrees apart (PAL), which holds only
// if the output subcarrier has exactly the standard's frequency. Every
// colour bar is also compared with the EIA / EBU colour bar tables:
// luminance in IRE (within 1.5), chrominance peak-to-peak in IRE (within 3)
// and chrominance phase relative to the burst (within 2.5 degrees, both
// PAL line phases); amplitude and phase come from a least-squares sine fit
// against the ideal subcarrier. Each mechanism is counted and
// a mechanism that never happened is a failure.
module tb_video_encoder;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, lb_clk = 1'b0, lb_rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [3:0] prog_addr = '0;
  logic [23:0] prog_data = '0;
  logic [7:0] pix0 = '0, pix1 = '0, pix2 = '0;
  logic helper_in = 1'b0;
  logic lb_line_start = 0, lb_field_start = 0, lb_field_id = 0, lb_progressive = 0;
  logic lb_helper_en = 0, lb_valid = 0;
  logic [23:0] lb_din = '0;
  logic fm_wr, fm_helper, pix_ce, field;
  logic [19:0] fm_addr;
  logic [23:0] fm_data;
  logic [10:0] hcnt;
  logic [9:0] line_no, luma, chroma, composite;
  seg_t seg;
  int checks = 0, failures = 0;

  video_encoder dut (
    .xclk, .rst_n, .prog_we, .prog_addr, .prog_data, .pix0, .pix1, .pix2, .helper_in,
    .lb_clk, .lb_rst_n, .lb_line_start, .lb_field_start, .lb_field_id, .lb_progressive,
    .lb_helper_en, .lb_valid, .lb_din, .fm_wr, .fm_addr, .fm_data, .fm_helper,
    .pix_ce, .hcnt, .line_no, .field, .seg, .luma, .chroma, .composite
  );

  always #18.5 xclk = ~xclk;     // 27 MHz external clock
  always #27.8 lb_clk = ~lb_clk; // 18 MHz letter-box clock

  initial begin
    #400ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- setup
  typedef struct {
    int hcount, fp, sy, br, bu, cbp, va, sl, sh, el, eh;
    int sync, blank, black, gain, burst;
    int p1, p2, p3;
    bit pal;
    int ugain, vgain;
  } std_t;

  std_t NTSC = '{858, 16, 64, 8, 34, 16, 720, 16, 382, 16, 47,
                 16, 280, 330, 178, 56, 543, 104, 104, 1'b0, 76, 108};
  std_t PAL  = '{864, 12, 64, 11, 31, 26, 720, 12, 381, 12, 44,
                 16, 240, 240, 153, 55, 672, 2061, 2062, 1'b1, 66, 93};
  // Two more rates of the supported set, with timing scaled from the
  // standards' microsecond values: NTSC 12.27 MHz (780 pixels per line)
  // and PAL 14.75 MHz (944 pixels per line).
  std_t NTSC780 = '{780, 18, 58, 7, 31, 20, 640, 18, 351, 18, 47,
                    16, 280, 330, 178, 56, 597, 1040, 1040, 1'b0, 76, 108};
  std_t PAL944  = '{944, 24, 69, 13, 33, 38, 752, 24, 427, 24, 59,
                    16, 240, 240, 153, 55, 615, 2253, 2254, 1'b1, 66, 93};
  std_t cur;
  bit rgb, palplus;

  task automatic wr(input int a, input int hi, input int lo);
    @(negedge xclk);
    prog_we = 1; prog_addr = 4'(a); prog_data = {12'(hi), 12'(lo)};
    @(negedge xclk);
    prog_we = 0;
  endtask

  task automatic program_regs(input std_t s, input bit rgb_in, input bit pp);
    rst_n = 0;
    cur = s; rgb = rgb_in; palplus = pp;
    repeat (2) @(negedge xclk);
    wr(0, s.hcount, s.fp);   wr(1, s.sy, s.br);     wr(2, s.bu, s.cbp);
    wr(3, s.va, s.sl);       wr(4, s.sh, s.el);     wr(5, s.eh, s.sync);
    wr(6, s.blank, s.black); wr(7, s.gain, s.burst & 8'hff);
    wr(8, 0, s.p1);
    @(negedge xclk); prog_we = 1; prog_addr = 9;  prog_data = 24'(s.p2); @(negedge xclk);
    prog_addr = 10; prog_data = 24'(s.p3); @(negedge xclk);
    prog_addr = 11; prog_data = 24'd0; @(negedge xclk);
    prog_addr = 12; prog_data = {21'd0, pp, rgb_in, s.pal}; @(negedge xclk);
    prog_addr = 13; prog_data = {4'd0, 8'(s.ugain), 4'd0, 8'(s.vgain)}; @(negedge xclk);
    prog_we = 0;
    @(negedge xclk);
    rst_n = 1;
  endtask

  // ---------------------------------------------------------- picture source
  int rgb_bar [8][3] = '{'{191,191,191}, '{191,191,0}, '{0,191,191}, '{0,191,0},
                         '{191,0,191}, '{191,0,0}, '{0,0,191}, '{0,0,0}};
  localparam int LEAD = 3;    // present the pixel for position h at hcnt = h - LEAD
  localparam int LAG  = 8;    // outputs show position h at about hcnt = h + LAG

  function automatic int pic_start();
    return cur.fp + cur.sy + cur.br + cur.bu + cur.cbp;
  endfunction

  function automatic int bar_of(input int pos);
    int b;
    b = (pos - pic_start()) / (cur.va / 8);
    return b < 0 ? 0 : b > 7 ? 7 : b;
  endfunction

  function automatic real ycc(input int k, input int c);
    real r, g, b;
    r = rgb_bar[k][0]; g = rgb_bar[k][1]; b = rgb_bar[k][2];
    case (c)
      0: return 16.0 + (65.738 * r + 129.057 * g + 25.064 * b) / 256.0;
      1: return 128.0 + (-37.945 * r - 74.494 * g + 112.439 * b) / 256.0;
      default: return 128.0 + (112.439 * r - 94.154 * g - 18.285 * b) / 256.0;
    endcase
  endfunction

  bit helper_lines;    // PALplus run: helper luminance on every other line
  always @(posedge xclk) if (pix_ce) begin
    int pos, k;
    pos = int'(hcnt) + 1 + LEAD;   // hcnt after this edge is hcnt + 1
    k = bar_of(pos);
    if (helper_lines && line_no[0]) begin
      helper_in <= 1'b1;
      pix0 <= 8'(40 + k * 20); pix1 <= 8'd200; pix2 <= 8'd30;
    end else begin
      helper_in <= 1'b0;
      if (rgb) begin
        pix0 <= 8'(rgb_bar[k][0]); pix1 <= 8'(rgb_bar[k][1]); pix2 <= 8'(rgb_bar[k][2]);
      end else begin
        pix0 <= 8'($rtoi(ycc(k, 0) + 0.5)); pix1 <= 8'($rtoi(ycc(k, 1) + 0.5));
        pix2 <= 8'($rtoi(ycc(k, 2) + 0.5));
      end
    end
  end

  // ------------------------------------------------------------- monitors
  int n_sync_lines, n_burst_lines, n_active_lines, n_bars, n_helper, n_pal_sw_toggles;
  int n_vsync_pulses, n_rgb_bars, n_bypass_bars, n_lb_writes, n_lb_skip, n_frames_ntsc, n_frames_pal, n_frames_other;
  int type_seen [9];
  int cmin, cmax, bmin, bmax, sync_cnt;
  bit monitor_on = 0;

  function automatic int exp_luma(input real y);
    int v;
    v = cur.black + $rtoi($floor((y - 16.0) * cur.gain / 64.0));
    return v < 0 ? 0 : v > 1023 ? 1023 : v;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("line %0d hcnt %0d: %s", line_no, hcnt, msg);
  endtask

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  // Ideal subcarrier: cycles per output sample (the output rate is twice
  // the pixel rate, which is HCOUNT times the line frequency). A constant burst phase against it over a
  // whole frame means the output subcarrier has exactly this frequency.
  localparam real PI = 3.14159265358979;
  function automatic real sc_ratio();
    return cur.pal ? (1135.0 / 4.0 + 1.0 / 625.0) / (2.0 * real'(cur.hcount))
                   : 227.5 / (2.0 * real'(cur.hcount));
  endfunction
  function automatic real frac(input real x);
    return x - $floor(x);
  endfunction
  function automatic real wrap180(input real d);
    real r;
    r = d;
    while (r > 180.0) r -= 360.0;
    while (r < -180.0) r += 360.0;
    return r;
  endfunction
  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction
  longint ncyc;
  real    bq_i, bq_q, ref_ph [2];
  bit     ref_ok [2];
  int     n_burst_phase [2];
  // Table 2 of the colour bars: chrominance phase (burst at 180 deg for NTSC,
  // 135 deg for PAL lines without V inversion), phase on PAL lines with the
  // burst at 225 deg, chrominance peak-to-peak in IRE, luminance in IRE.
  real    burst_psi;
  int     burst_k;
  real    t2_phase     [8] = '{0.0, 167.0, 283.0, 241.0, 61.0, 103.0, 347.0, 0.0};
  real    t2_phase_225 [8] = '{0.0, 193.0, 77.0, 120.0, 300.0, 257.0, 13.0, 0.0};
  real    t2_chroma    [8] = '{0.0, 62.0, 88.0, 82.0, 82.0, 88.0, 62.0, 0.0};
  real    t2_luma_ntsc [8] = '{77.0, 69.0, 56.0, 48.0, 36.0, 28.0, 15.0, 7.5};
  real    t2_luma_pal  [8] = '{0.0, 66.0, 53.0, 44.0, 31.0, 22.0, 9.0, 0.0};
  // Least-squares fit of c = a sin(th) + b cos(th) over a window, with th
  // the ideal subcarrier phase: exact for a pure sine over any window
  // length. Slots 0..7 are the bars, slot 8 the burst.
  real    f_s [9], f_c [9], f_ss [9], f_cc [9], f_sc [9];
  function automatic void fit_clear(input int k);
    f_s[k] = 0.0; f_c[k] = 0.0; f_ss[k] = 0.0; f_cc[k] = 0.0; f_sc[k] = 0.0;
  endfunction
  function automatic void fit_add(input int k, input real c, input real th);
    real sn, cs;
    sn = $sin(th); cs = $cos(th);
    f_s[k] += c * sn; f_c[k] += c * cs;
    f_ss[k] += sn * sn; f_cc[k] += cs * cs; f_sc[k] += sn * cs;
  endfunction
  // phase psi (degrees) and amplitude A of c = A sin(th + psi)
  function automatic void fit_get(input int k, output real psi, output real amp);
    real det, a, b;
    det = f_ss[k] * f_cc[k] - f_sc[k] * f_sc[k];
    a = (f_s[k] * f_cc[k] - f_c[k] * f_sc[k]) / det;
    b = (f_c[k] * f_ss[k] - f_s[k] * f_sc[k]) / det;
    psi = $atan2(b, a) * 180.0 / PI;
    amp = $sqrt(a * a + b * b);
  endfunction
  int     n_t2_phase, n_t2_chroma, n_t2_luma;
  always @(posedge xclk)
    if (!rst_n) begin
      ncyc <= 0; ref_ok[0] <= 1'b0; ref_ok[1] <= 1'b0;
    end else ncyc <= ncyc + 1;

  line_t lt_now;
  always @(posedge xclk) if (rst_n && monitor_on) begin
    int h, pos, k, bstart;
    h = int'(hcnt);
    lt_now = dut.ltype;
    pos = h - LAG;
    bstart = cur.fp + cur.sy + cur.br;
    // composite is always luma + chroma offset (one xclk later)
    if (h == 5 && pix_ce) type_seen[int'(lt_now)]++;
    if (lt_now == LT_UVV || lt_now == LT_UBB) begin
      // sync tip and blanking
      if (pos == cur.fp + cur.sy / 2 && pix_ce) begin
        checks++;
        if (luma != 10'(cur.sync) || composite != 10'(cur.sync)) fail($sformatf("sync level %0d/%0d", luma, composite));
        else n_sync_lines++;
      end
      if (pos == bstart + cur.bu / 2 && pix_ce) begin
        checks++;
        if (luma != 10'(cur.blank)) fail($sformatf("blanking level under the burst %0d", luma));
      end
      // burst amplitude
      if (pos == bstart + 4) begin bmin = 1023; bmax = 0; end
      if (pos > bstart + 4 && pos < bstart + cur.bu - 4) begin
        if (int'(chroma) < bmin) bmin = chroma;
        if (int'(chroma) > bmax) bmax = chroma;
      end
      if (pos == bstart + cur.bu - 4 && pix_ce) begin
        real e;
        e = 2.0 * cur.burst * 127.0 * cur.ugain / 4096.0;
        checks++;
        if (real'(bmax - bmin) < 0.8 * e || real'(bmax - bmin) > 1.15 * e)
          fail($sformatf("burst p-p %0d expected about %0.0f", bmax - bmin, e));
        else n_burst_lines++;
      end
      // burst phase against an ideal subcarrier running since reset
      if (pos == bstart + 4 && pix_ce) begin bq_i = 0.0; bq_q = 0.0; fit_clear(8); end
      if (pos > bstart + 4 && pos < bstart + cur.bu - 4) begin
        real th;
        th = 2.0 * PI * frac(real'(ncyc) * sc_ratio());
        bq_i += (real'(chroma) - 512.0) * $cos(th);
        bq_q += (real'(chroma) - 512.0) * $sin(th);
        fit_add(8, real'(chroma) - 512.0, th);
      end
      if (pos == bstart + cur.bu - 4 && pix_ce) begin
        real ph, amp_unused;
        int k;
        ph = $atan2(bq_q, bq_i) * 180.0 / PI;
        k = (cur.pal && dut.u_subgen.pal_sw) ? 1 : 0;
        burst_k = k;
        fit_get(8, burst_psi, amp_unused);
        if (!ref_ok[k]) begin
          ref_ph[k] = ph; ref_ok[k] = 1'b1;
        end else begin
          checks++;
          if (fabs(wrap180(ph - ref_ph[k])) > 6.0)
            fail($sformatf("burst phase drifted %0.1f deg from the ideal subcarrier", ph - ref_ph[k]));
          else n_burst_phase[cur.pal ? 1 : 0]++;
        end
        if (cur.pal && ref_ok[0] && ref_ok[1] && k == 1) begin
          checks++;
          if (fabs(fabs(wrap180(ref_ph[1] - ref_ph[0])) - 90.0) > 6.0)
            fail($sformatf("PAL burst phases %0.1f / %0.1f deg are not 90 deg apart", ref_ph[0], ref_ph[1]));
        end
      end
    end
    if (lt_now == LT_UVV && line_no != 10'(cur.pal ? 23 : 21)) begin
      if (pos == pic_start() + 10 && pix_ce) n_active_lines++;
      for (int b = 0; b < 8; b++) begin
        int c0;
        c0 = pic_start() + (cur.va / 8) * b + cur.va / 16;
        if (pos == c0 - 25) begin
          cmin = 1023; cmax = 0; fit_clear(b);
        end
        if (pos > c0 - 25 && pos < c0 + 25) begin
          real th;
          if (int'(chroma) < cmin) cmin = chroma;
          if (int'(chroma) > cmax) cmax = chroma;
          th = 2.0 * PI * frac(real'(ncyc) * sc_ratio());
          fit_add(b, real'(chroma) - 512.0, th);
        end
        if (pos == c0 + 25 && pix_ce) begin
          real u, v, e, ire, amp, ph, t;
          bit hl;
          hl = helper_lines && line_no[0] == 1'b1;
          u = (ycc(b, 1) - 128.0) * cur.ugain; v = (ycc(b, 2) - 128.0) * cur.vgain;
          e = hl ? 0.0 : 2.0 * $sqrt(u * u + v * v) * 127.0 / 4096.0;
          checks++;
          if (real'(cmax - cmin) > 1.15 * e + 8.0 || real'(cmax - cmin) < 0.8 * e - 8.0)
            fail($sformatf("bar %0d chroma p-p %0d expected about %0.0f", b, cmax - cmin, e));
          // Table 2: peak-to-peak chroma in IRE from the fitted amplitude; the PAL table lists the NTSC figures, which include
          // the 7.5 IRE set-up (x 0.925), so PAL is compared against them
          // divided by 0.925.
          ire = cur.pal ? real'(cur.blank - cur.sync) / (300.0 / 7.0)
                        : real'(cur.blank - cur.sync) / 40.0;
          fit_get(b, ph, amp);
          amp = 2.0 * amp / ire;
          if (!hl && b >= 1 && b <= 6) begin
            t = cur.pal ? t2_chroma[b] / 0.925 : t2_chroma[b];
            checks++;
            if (fabs(amp - t) > 3.0) fail($sformatf("bar %0d chroma %0.1f IRE, Table 2 %0.1f", b, amp, t));
            else n_t2_chroma++;
            // Table 2: chroma phase relative to the burst of this line
            ph = ph - burst_psi
               + (cur.pal ? (burst_k == 1 ? 225.0 : 135.0) : 180.0);
            t = (cur.pal && burst_k == 1) ? t2_phase_225[b] : t2_phase[b];
            checks++;
            if (fabs(wrap180(ph - t)) > 2.5)
              fail($sformatf("bar %0d chroma phase %0.1f deg, Table 2 %0.1f", b, wrap180(ph), t));
            else n_t2_phase++;
          end
        end
        if (pos == c0 && pix_ce) begin
          int e;
          real ire, t;
          bit hl;
          hl = helper_lines && line_no[0] == 1'b1;
          e = hl ? exp_luma(real'(40 + b * 20)) : exp_luma(ycc(b, 0));
          // Table 2 luminance in IRE above blanking (the PAL white bar of
          // the table is 100 % white and is skipped: these bars are 75 %)
          ire = cur.pal ? real'(cur.blank - cur.sync) / (300.0 / 7.0)
                        : real'(cur.blank - cur.sync) / 40.0;
          if (!hl && (!cur.pal || b > 0)) begin
            t = cur.pal ? t2_luma_pal[b] : t2_luma_ntsc[b];
            checks++;
            if (fabs((real'(luma) - real'(cur.blank)) / ire - t) > 1.5)
              fail($sformatf("bar %0d luma %0.1f IRE, Table 2 %0.1f", b, (real'(luma) - real'(cur.blank)) / ire, t));
            else n_t2_luma++;
          end
          checks++;
          if (absd(int'(luma), e) > 4) fail($sformatf("bar %0d luma %0d expected %0d", b, luma, e));
          else begin
            n_bars++;
            if (hl) n_helper++;
            else if (rgb) n_rgb_bars++;
            else n_bypass_bars++;
          end
        end
      end
    end
    // broad pulses: count sync-level samples on vertical sync lines
    if (lt_now == LT_VS) begin
      if (h == LAG && pix_ce) sync_cnt = 0;
      // samples below the half amplitude point between sync and blanking
      if (2 * int'(luma) < cur.sync + cur.blank) sync_cnt++;
      if (h == int'(cur.hcount) - 1 && pix_ce) begin
        checks++;
        if (absd(sync_cnt, 2 * 2 * (cur.sh - cur.sl)) > 4)
          fail($sformatf("broad pulse samples %0d expected %0d", sync_cnt, 4 * (cur.sh - cur.sl)));
        else n_vsync_pulses++;
      end
    end
  end

  // composite must equal luma + chroma - 512 (clamped), same cycle
  always @(posedge xclk) if (rst_n && monitor_on) begin
    int e;
    e = int'(luma) + int'(chroma) - 512;
    // luma and chroma are each clamped; the sum is clamped separately
    if (e >= 0 && e <= 1023 && luma != 0 && luma != 1023 && chroma != 0 && chroma != 1023) begin
      checks++;
      if (int'(composite) != e) fail($sformatf("composite %0d luma %0d chroma %0d", composite, luma, chroma));
    end
  end

  logic sw_q;
  always @(posedge xclk) if (rst_n) begin
    if (dut.u_subgen.pal_sw != sw_q) n_pal_sw_toggles++;
    sw_q <= dut.u_subgen.pal_sw;
  end

  // --------------------------------------------------------------- frames
  task automatic run_lines(input int n);
    int cnt;
    cnt = 0;
    while (cnt < n) begin
      @(posedge xclk);
      if (pix_ce && hcnt == 11'(cur.hcount - 1)) cnt++;
    end
  endtask

  task automatic run_frame(output int lines_seen);
    int maxl;
    maxl = 0;
    // wait for line 1
    while (!(line_no == 10'd1 && hcnt == 0)) @(posedge xclk);
    monitor_on = 1;
    do begin
      @(posedge xclk);
      if (int'(line_no) > maxl) maxl = line_no;
    end while (!(line_no == 10'd1 && hcnt == 0 && maxl > 1));
    monitor_on = 0;
    lines_seen = maxl;
  endtask

  // ----------------------------------------------------------- letter-box
  logic [7:0] lb_val [8];
  int lb_exp [$];
  always @(posedge lb_clk) if (lb_rst_n && fm_wr) begin
    checks++;
    if (lb_exp.size() == 0) fail("unexpected frame memory write");
    else begin
      int e;
      e = lb_exp.pop_front();
      if (int'(fm_data[7:0]) != e || int'(fm_data[15:8]) != e) fail($sformatf("frame memory data %h expected %0d", fm_data, e));
      else n_lb_writes++;
    end
  end

  task automatic lb_field(input bit even);
    for (int l = 0; l < 8; l++) begin
      int e;
      lb_val[l] = 8'($urandom_range(16, 235));
      e = -1;
      if (!even) case (l % 4)
        0: e = lb_val[l];
        2: e = (2 * lb_val[l-1] + lb_val[l]) / 3;
        3: e = (lb_val[l-1] + 2 * lb_val[l]) / 3;
        default: ;
      endcase
      else case (l % 4)
        1: e = (5 * lb_val[l-1] + lb_val[l]) / 6;
        2: e = (lb_val[l-1] + lb_val[l]) / 2;
        3: e = (lb_val[l-1] + 5 * lb_val[l]) / 6;
        default: ;
      endcase
      if (e < 0) n_lb_skip++;
      else for (int p = 0; p < 1152; p++) lb_exp.push_back(e);
      @(negedge lb_clk);
      lb_line_start = 1; lb_field_start = (l == 0); lb_field_id = even;
      @(negedge lb_clk);
      lb_line_start = 0; lb_field_start = 0;
      for (int p = 0; p < 1152; p++) begin
        lb_valid = 1; lb_din = {3{lb_val[l]}};
        @(negedge lb_clk);
      end
      lb_valid = 0;
      repeat (40) @(negedge lb_clk);
    end
  endtask

  // ----------------------------------------------------------------- main
  initial begin
    int lines;
    $display("NTSC frame, R'G'B' colour bars");
    program_regs(NTSC, 1'b1, 1'b0);
    run_frame(lines);
    checks++;
    if (lines != 525) fail($sformatf("NTSC frame has %0d lines", lines));
    else n_frames_ntsc++;

    $display("NTSC, Y'CbCr input");
    program_regs(NTSC, 1'b0, 1'b0);
    run_lines(30);
    monitor_on = 1;
    run_lines(6);
    monitor_on = 0;

    $display("PAL frame, R'G'B' colour bars");
    n_pal_sw_toggles = 0;
    program_regs(PAL, 1'b1, 1'b0);
    run_frame(lines);
    checks++;
    if (lines != 625) fail($sformatf("PAL frame has %0d lines", lines));
    else n_frames_pal++;
    checks++;
    if (n_pal_sw_toggles < 600) fail($sformatf("PAL switch toggled %0d times", n_pal_sw_toggles));

    $display("NTSC frame at 12.27 MHz (780 pixels per line)");
    program_regs(NTSC780, 1'b1, 1'b0);
    run_frame(lines);
    checks++;
    if (lines != 525) fail($sformatf("NTSC 780 frame has %0d lines", lines));
    else n_frames_other++;

    $display("PAL frame at 14.75 MHz (944 pixels per line)");
    program_regs(PAL944, 1'b1, 1'b0);
    run_frame(lines);
    checks++;
    if (lines != 625) fail($sformatf("PAL 944 frame has %0d lines", lines));
    else n_frames_other++;

    $display("PALplus: helper lines and letter-box conversion");
    program_regs(PAL, 1'b1, 1'b1);
    lb_rst_n = 1;
    helper_lines = 1;
    fork
      begin
        run_lines(30);
        monitor_on = 1;
        run_lines(6);
        monitor_on = 0;
      end
      begin
        lb_field(1'b0);
        lb_field(1'b1);
      end
    join
    repeat (20) @(posedge lb_clk);
    checks++;
    if (lb_exp.size() != 0) fail($sformatf("%0d frame memory writes missing", lb_exp.size()));

    $display("mechanisms: sync lines %0d, burst lines %0d, active lines %0d, bars %0d (R'G'B' %0d, bypass %0d, helper %0d)",
             n_sync_lines, n_burst_lines, n_active_lines, n_bars, n_rgb_bars, n_bypass_bars, n_helper);
    $display("            broad-pulse lines %0d, PAL switch toggles %0d, frame memory writes %0d, skipped lines %0d",
             n_vsync_pulses, n_pal_sw_toggles, n_lb_writes, n_lb_skip);
    $display("            burst phase locked to the ideal subcarrier: NTSC lines %0d, PAL lines %0d",
             n_burst_phase[0], n_burst_phase[1]);
    $display("            frames at 780 / 944 pixels per line %0d", n_frames_other);
    $display("            Table 2 bars matched: luminance %0d, chrominance %0d, phase %0d",
             n_t2_luma, n_t2_chroma, n_t2_phase);
    foreach (type_seen[t]) begin
      checks++;
      if (type_seen[t] == 0) fail($sformatf("line type %s never drawn", line_t'(t)));
    end
    checks++; if (n_sync_lines == 0)    fail("no horizontal sync");
    checks++; if (n_burst_lines == 0)   fail("no burst");
    checks++; if (n_rgb_bars == 0)      fail("matrix never converted R'G'B'");
    checks++; if (n_bypass_bars == 0)   fail("matrix never bypassed");
    checks++; if (n_helper == 0)        fail("no helper pixels");
    checks++; if (n_vsync_pulses == 0)  fail("no broad pulses");
    checks++; if (n_burst_phase[0] < 400) fail("NTSC subcarrier frequency not confirmed");
    checks++; if (n_burst_phase[1] < 500) fail("PAL subcarrier frequency not confirmed");
    checks++; if (n_frames_other != 2)    fail("frames at the other pixel rates incomplete");
    checks++; if (n_t2_luma == 0 || n_t2_chroma == 0 || n_t2_phase == 0) fail("Table 2 never compared");
    checks++; if (n_lb_writes == 0)     fail("no letter-box writes");
    checks++; if (n_lb_skip == 0)       fail("no decimated (skipped) line");
    checks++; if (n_frames_ntsc == 0 || n_frames_pal == 0) fail("mode switch incomplete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
