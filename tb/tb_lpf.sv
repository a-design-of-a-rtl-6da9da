// Testbench for lpf: random signed input, one sample per pixel clock; the
// output must equal the 5-tap symmetric FIR (8 32 48 32 8) / 128 of the
// input computed here, truncated, with a latency of two pixel clocks.
module tb_lpf;
  logic xclk = 1'b0, rst_n = 1'b0, ce;
  logic signed [7:0] x = '0, y;
  int checks = 0, failures = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  lpf dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .x (x), .y (y));

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

  int hist [$];
  int h [5] = '{8, 32, 48, 32, 8};

  initial begin
    repeat (4) @(posedge xclk);
    rst_n = 1'b1;
    for (int i = 0; i < 6; i++) hist.push_front(0);
    for (int n = 0; n < 3000; n++) begin
      int v, acc, e;
      v = (n % 500 < 40) ? 127 * ((n / 7) % 2 ? 1 : -1) : $urandom_range(0, 255) - 128;
      x = 8'(v);
      pixel_edge();            // x sampled on this edge
      hist.push_front(v);
      // after this edge y holds the result for the sample taken one edge earlier
      acc = 0;
      for (int k = 0; k < 5; k++) acc += h[k] * hist[1 + k];
      e = acc >>> 7;
      if (n >= 6) begin
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
