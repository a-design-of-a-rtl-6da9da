// Testbench for subgen. Two generators run side by side, one with the burst
// input low and one with it high. It runs every pixel rate of the supported
// rate table: NTSC with 780, 858, 910 and 1144 pixels per line and PAL with
// 864, 944, 1135 and 1152 pixels per line, the pixel rate being the line
// length times the standard's line frequency. For each rate the testbench
// derives p1, p2 and p3 itself from the standard's subcarrier definition
// (NTSC fsc = 227.5 fH; PAL fsc = (1135/4 + 1/625) fH), programs them, and
// checks every pixel clock that:
//  - the amplitude of (sin, cos) is close to 127;
//  - the phase recovered with atan2 follows the ideal subcarrier phase
//    n * 2048 * fsc / fs within 5 counts over the whole run;
//  - the burst phase differs from the active-video phase by 180 degrees
//    (NTSC) or by 135 / 225 degrees alternating line by line (PAL): the
//    burst phase minus the active phase is 1024, 1280 or 768 counts;
//  - the PAL switch toggles every line in PAL and stays low in NTSC.
module tb_subgen;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, ce;
  logic pal_op = 1'b0, line_start = 1'b0;
  logic [10:0] p1 = '0, hcount = '0;
  logic [15:0] p2 = '0, p3 = '0;
  sinval_t sa, ca, sb, cb;
  logic swa, swb;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  subgen dut_a (.xclk (xclk), .rst_n (rst_n), .ce (ce), .pal_op (pal_op), .p1 (p1), .p2 (p2),
                .p3 (p3), .hcount (hcount), .phase_adj (11'd0), .line_start (line_start),
                .burst (1'b0), .sinwt (sa), .coswt (ca), .pal_sw (swa));
  subgen dut_b (.xclk (xclk), .rst_n (rst_n), .ce (ce), .pal_op (pal_op), .p1 (p1), .p2 (p2),
                .p3 (p3), .hcount (hcount), .phase_adj (11'd0), .line_start (line_start),
                .burst (1'b1), .sinwt (sb), .coswt (cb), .pal_sw (swb));

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

  function automatic real sv(input sinval_t s);
    return s.sign ? -real'(s.mag) : real'(s.mag);
  endfunction

  // phase in counts (0..2048) of a (sin, cos) pair
  function automatic real phase_of(input sinval_t s, input sinval_t c, input bit inv);
    real ph;
    ph = $atan2(sv(s), inv ? -sv(c) : sv(c)) * 1024.0 / PI;
    return ph < 0 ? ph + 2048.0 : ph;
  endfunction

  function automatic real wrapd(input real d);
    real r;
    r = d;
    while (r > 1024.0) r -= 2048.0;
    while (r < -1024.0) r += 2048.0;
    return r;
  endfunction

  // Phase increment per pixel times 4H is 2048 * 4 * fsc / fH:
  //   NTSC: 2048 * 910 = 1863680 exactly;
  //   PAL:  2048 * 1135 + 8192 / 625 = 2324480 + 13 + 67/625.
  // p1 is the whole part over 4H, p2 the remainder; PAL's 67/625 count is
  // what the modulo-625 accumulator adds by choosing p3 = p2 + 1.
  task automatic run(input bit pal, input int H, input int npix);
    real fsc, fh, fs, inc, unwrapped, prevph, ph0, ph, phb, e, amp;
    bit sw_used, first;
    int num;
    fh  = pal ? 15625.0 : 4.5e6 / 286.0;
    fsc = pal ? (1135.0 / 4.0 + 1.0 / 625.0) * fh : 227.5 * fh;
    fs  = real'(H) * fh;
    inc = 2048.0 * fsc / fs;
    num = pal ? 2048 * 1135 : 2048 * 910;
    rst_n = 1'b0;
    pal_op = pal; hcount = 11'(H);
    p1 = 11'(num / (4 * H));
    p2 = 16'(num % (4 * H) + (pal ? 13 : 0));
    p3 = 16'(num % (4 * H) + (pal ? 14 : 0));
    $display("%s H=%0d fs=%.4f MHz: p1=%0d p2=%0d p3=%0d", pal ? "PAL " : "NTSC",
             H, fs / 1.0e6, p1, p2, p3);
    repeat (4) @(posedge xclk);
    rst_n = 1'b1;
    first = 1;
    unwrapped = 0; prevph = 0; ph0 = 0;
    for (int n = 0; n < npix; n++) begin
      line_start = (n % H == H - 1);
      sw_used = swa;
      pixel_edge();
      if (n < 2) continue;
      ph  = phase_of(sa, ca, pal && sw_used);
      phb = phase_of(sb, cb, pal && sw_used);
      amp = $sqrt(sv(sa) * sv(sa) + sv(ca) * sv(ca));
      checks++;
      if (amp < 120.0 || amp > 128.5) begin
        failures++; if (failures < 10) $display("amplitude %f at %0d", amp, n);
      end
      if (first) begin
        ph0 = ph; prevph = ph; first = 0; unwrapped = 0;
      end else begin
        unwrapped += wrapd(ph - prevph);
        prevph = ph;
        e = unwrapped - inc * real'(n - 2);
        checks++;
        if (e > 5.0 || e < -5.0) begin
          failures++; if (failures < 10) $display("%s phase error %f counts at pixel %0d", pal ? "PAL" : "NTSC", e, n);
        end
      end
      // burst phase relative to active phase
      e = wrapd(phb - ph - (pal ? (sw_used ? 1280.0 : 768.0) : 1024.0));
      checks++;
      if (e > 5.0 || e < -5.0) begin
        failures++; if (failures < 10) $display("burst offset error %f at %0d", e, n);
      end
      // PAL switch
      if (line_start) begin
        checks++;
        if (swa != (pal ? !sw_used : 1'b0)) begin
          failures++; $display("pal_sw did not behave at %0d", n);
        end
      end
    end
    line_start = 1'b0;
  endtask

  localparam int ntsc_h [4] = '{858, 780, 910, 1144};
  localparam int pal_h  [4] = '{864, 944, 1135, 1152};

  initial begin
    // NTSC: 13.5 MHz (858) first, then the other rates
    foreach (ntsc_h[i]) run(1'b0, ntsc_h[i], 4 * ntsc_h[i] * (i == 0 ? 3 : 2));
    foreach (pal_h[i])  run(1'b1, pal_h[i], pal_h[i] * (i == 0 ? 30 : 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
