// Testbench for line_delay: random words with random gaps; once the buffer
// has filled, every read must return the word written DEPTH writes earlier.
module tb_line_delay;
  localparam int DEPTH = 37;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [23:0] din = '0, dout;
  logic [23:0] hist [$];
  int checks = 0, failures = 0;

  line_delay #(.DEPTH (DEPTH), .W (24)) dut (.clk (clk), .rst_n (rst_n), .en (en),
                                             .din (din), .dout (dout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp;
    logic        pending;
    pending = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 24'($urandom);
      @(posedge clk); #1;
      if (pending) begin
        // result of the previous enabled write shows after its edge
      end
      if (en) begin
        if (hist.size() >= DEPTH) begin
          exp = hist[hist.size() - DEPTH];
          checks++;
          if (dout !== exp) begin
            failures++;
            if (failures < 10) $display("write %0d: dout %h expected %h", hist.size(), dout, exp);
          end
        end
        hist.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
