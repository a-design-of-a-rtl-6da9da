// Testbench for interp: random signed 11-bit input samples at the pixel
// rate (plus full-scale steps to exercise saturation). The testbench builds
// the zero-stuffed sequence itself and convolves it with the 16-tap
// response 1 0 -3 6 5 -25 14 130 130 14 -25 5 6 -3 0 1, shifts right by 7
// and saturates; the output must match two xclk cycles after a sample enters
// the filter. A constant input must come out unchanged on both output phases.
module tb_interp;
  localparam int W = 11;
  logic xclk = 1'b0, rst_n = 1'b0, ce;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0, sat = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  interp #(.W (W)) dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .x (x), .y (y));

  always #5 xclk = ~xclk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [16] = '{1, 0, -3, 6, 5, -25, 14, 130, 130, 14, -25, 5, 6, -3, 0, 1};
  int s [$];
  int expq [$];

  // model, evaluated at every rising xclk edge
  always @(posedge xclk) if (rst_n) begin
    int acc, e;
    s.push_front(ce ? 0 : int'(x));
    if (s.size() > 16) void'(s.pop_back());
    acc = 0;
    foreach (s[k]) acc += h[k] * s[k];
    e = acc >>> 7;
    if (e > 1023) begin e = 1023; sat++; end
    if (e < -1024) begin e = -1024; sat++; end
    expq.push_back(e);
  end

  // output check: y after edge n+2 equals the model value of edge n
  int n = 0;
  always @(posedge xclk) if (rst_n) begin
    #1;
    n++;
    if (expq.size() > 2) begin
      int e;
      e = expq.pop_front();
      if (n > 20) begin
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, e);
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge xclk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      do @(posedge xclk); while (ce !== 1'b1);
      #2;
      if (i % 400 < 40)       x = (i % 400 < 20) ? 11'sd1023 : -11'sd1024;
      else if (i % 400 < 80)  x = 11'sd300;
      else                    x = W'($urandom);
      if (i % 400 == 79) begin
        checks++;
        if (y != 11'sd300) begin
          failures++; $display("constant 300 came out as %0d", y);
        end
      end
    end
    checks++;
    if (sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
