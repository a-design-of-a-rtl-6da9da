// Testbench for quad_mod: random U, V, sine and cosine samples, gains and
// burst flags; the chroma output one pixel clock later must equal
// floor((floor(U*sin/256)*U_GAIN + floor(V*cos/256)*V_GAIN) / 16),
// saturated to -1024..1023,
// with U = burst amplitude and V = 0 during the burst. Includes runs with
// the largest gains so that the saturation is reached.
module tb_quad_mod;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, ce, burst = 1'b0;
  logic signed [7:0] u = '0, v = '0, amp = 8'sd66;
  sinval_t s = '0, c = '0;
  logic [7:0] gu = 8'd76, gv = 8'd108;
  logic signed [10:0] chroma;
  int checks = 0, failures = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  quad_mod dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .u (u), .v (v), .burst (burst),
                .burst_amp (amp), .u_gain (gu), .v_gain (gv), .sinwt (s), .coswt (c), .chroma (chroma));

  always #5 xclk = ~xclk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pixel_edge();
    do @(posedge xclk); while (ce !== 1'b1);
    #1;
  endtask

  function automatic int floordiv(input int x, input int d);
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction

  initial begin
    int nb = 0, nsat = 0;
    repeat (4) @(posedge xclk);
    rst_n = 1'b1;
    pixel_edge();
    for (int i = 0; i < 5000; i++) begin
      int ui, vi, si, ci, e;
      u = 8'($urandom); v = 8'($urandom); s = 8'($urandom); c = 8'($urandom);
      amp = 8'($urandom);
      gu = (i % 4 == 3) ? 8'd255 : 8'($urandom);
      gv = (i % 4 == 3) ? 8'd255 : 8'($urandom);
      burst = ($urandom_range(0, 5) == 0);
      si = s.sign ? -int'(s.mag) : int'(s.mag);
      ci = c.sign ? -int'(c.mag) : int'(c.mag);
      ui = burst ? int'(amp) : int'(u);
      vi = burst ? 0 : int'(v);
      e = floordiv(floordiv(ui * si, 256) * int'(gu) + floordiv(vi * ci, 256) * int'(gv), 16);
      if (e > 1023 || e < -1024) nsat++;
      e = e > 1023 ? 1023 : e < -1024 ? -1024 : e;
      if (burst) nb++;
      pixel_edge();
      checks++;
      if (int'(chroma) != e) begin
        failures++;
        if (failures < 10) $display("u=%0d v=%0d s=%0d c=%0d burst=%b: chroma %0d expected %0d", u, v, si, ci, burst, chroma, e);
      end
    end
    checks++;
    if (nb == 0) failures++;
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
