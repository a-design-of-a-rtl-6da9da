// Testbench for clk_div: the pixel enable must toggle on every xclk rising
// edge, start at 0 after reset, and clk must equal ce.
module tb_clk_div;
  logic xclk = 1'b0, rst_n = 1'b0;
  logic ce, clk;
  int checks = 0, failures = 0;

  clk_div dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk (clk));

  always #5 xclk = ~xclk;

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (3) @(posedge xclk);
    #1 rst_n = 1'b1;
    exp = 1'b0;
    checks++; if (ce !== 1'b0) failures++;
    for (int i = 0; i < 50; i++) begin
      @(posedge xclk); #1;
      exp = ~exp;
      checks++;
      if (ce !== exp || clk !== ce) begin
        failures++;
        $display("cycle %0d: ce=%b expected %b", i, ce, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
