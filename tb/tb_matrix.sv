// Testbench for matrix: random R'G'B' pixels, one per pixel clock, checked
// against the CCIR-601 conversion computed here in
// real arithmetic (allowed error: 1 code), one pixel clock after the pixel
// period in which the inputs were presented; the EIA colour bar inputs are
// checked against the Y, Cb, Cr rows of the standard colour bar table
// (within 1 code); bypass mode must pass Y'CbCr through unchanged.
module tb_matrix;
  logic xclk = 1'b0, rst_n = 1'b0, ce, bypass = 1'b0;
  logic [7:0] in0 = '0, in1 = '0, in2 = '0, y, cb, cr;
  int checks = 0, failures = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  matrix dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .bypass (bypass),
              .in0 (in0), .in1 (in1), .in2 (in2), .y (y), .cb (cb), .cr (cr));

  always #5 xclk = ~xclk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input real v);
    int r;
    r = $rtoi(v + 0.5 + 1000.0) - 1000;
    return r < 0 ? 0 : r > 255 ? 255 : r;
  endfunction

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  // wait for the next pixel edge (rising xclk while ce is high)
  task automatic pixel_edge();
    do @(posedge xclk); while (ce !== 1'b1);
    #1;
  endtask

  int ey, ecb, ecr;
  bit have_exp = 0;

  task automatic check_prev(input int tol);
    if (have_exp) begin
      checks++;
      if (absd(y, ey) > tol || absd(cb, ecb) > tol || absd(cr, ecr) > tol) begin
        failures++;
        if (failures < 10) $display("got %0d %0d %0d expected %0d %0d %0d", y, cb, cr, ey, ecb, ecr);
      end
    end
  endtask

  // colour bars: R', G', B' and expected Y, Cb, Cr (75% EIA bars)
  int bar_rgb [8][3] = '{'{191,191,191}, '{191,191,0}, '{0,191,191}, '{0,191,0},
                         '{191,0,191}, '{191,0,0}, '{0,0,191}, '{0,0,0}};
  int bar_ycc [8][3] = '{'{180,128,128}, '{162,44,142}, '{131,156,44}, '{112,72,58},
                         '{84,184,198}, '{65,100,212}, '{35,212,114}, '{16,128,128}};

  initial begin
    repeat (4) @(posedge xclk);
    rst_n = 1'b1;
    pixel_edge();
    // random pixels
    for (int i = 0; i < 3000; i++) begin
      int r, g, b;
      r = $urandom_range(0, 255); g = $urandom_range(0, 255); b = $urandom_range(0, 255);
      in0 = 8'(r); in1 = 8'(g); in2 = 8'(b);
      ey  = clip(16.0  + ( 65.738*r + 129.057*g +  25.064*b) / 256.0);
      ecb = clip(128.0 + (-37.945*r -  74.494*g + 112.439*b) / 256.0);
      ecr = clip(128.0 + (112.439*r -  94.154*g -  18.285*b) / 256.0);
      have_exp = 1;
      pixel_edge();             // result of this pixel period is loaded here
      check_prev(1);
    end
    // colour bars
    for (int k = 0; k < 8; k++) begin
      in0 = 8'(bar_rgb[k][0]); in1 = 8'(bar_rgb[k][1]); in2 = 8'(bar_rgb[k][2]);
      ey = bar_ycc[k][0]; ecb = bar_ycc[k][1]; ecr = bar_ycc[k][2];
      pixel_edge();
      check_prev(1);
    end
    // bypass
    bypass = 1'b1;
    for (int i = 0; i < 200; i++) begin
      int a, b2, c;
      a = $urandom_range(0, 255); b2 = $urandom_range(0, 255); c = $urandom_range(0, 255);
      in0 = 8'(a); in1 = 8'(b2); in2 = 8'(c);
      ey = a; ecb = b2; ecr = c;
      pixel_edge();
      check_prev(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
