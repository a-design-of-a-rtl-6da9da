// Testbench for vgen: steps through two whole NTSC frames and two PAL
// frames with one line_start per line and checks the line number, the wrap
// (525 / 625 lines) and the line type of every line against a table of
// transition lines written out here.
module tb_vgen;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, ce, pal_op = 1'b0, line_start = 1'b0;
  logic [9:0] line_no;
  line_t ltype;
  logic field;
  int checks = 0, failures = 0;

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  vgen dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .pal_op (pal_op), .line_start (line_start),
            .line_no (line_no), .ltype (ltype), .field (field));

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

  // transitions: first line of each run and its type
  int    nt_line [15] = '{1, 4, 7, 10, 21, 263, 264, 266, 267, 269, 270, 272, 273, 283, 284};
  line_t nt_type [15] = '{LT_EE, LT_VS, LT_EE, LT_UBB, LT_UVV, LT_UVE, LT_EE, LT_EV, LT_VS,
                          LT_VE, LT_EE, LT_EB, LT_UBB, LT_UBV, LT_UVV};
  int    pl_line [15] = '{1, 3, 4, 6, 23, 24, 311, 313, 314, 316, 318, 319, 336, 623, 624};
  line_t pl_type [15] = '{LT_VS, LT_VE, LT_EE, LT_UBB, LT_UBV, LT_UVV, LT_EE, LT_EV, LT_VS,
                          LT_EE, LT_EB, LT_UBB, LT_UVV, LT_UVE, LT_EE};

  task automatic run(input bit pal);
    int total, exp_line;
    line_t et;
    total = pal ? 625 : 525;
    rst_n = 1'b0; pal_op = pal;
    repeat (3) @(posedge xclk);
    rst_n = 1'b1;
    exp_line = 1;
    for (int i = 0; i < 2 * total; i++) begin
      // a few pixels per line, the last one carries line_start
      for (int p = 0; p < 3; p++) begin
        line_start = (p == 2);
        // check the type while the line is current
        if (p == 0) begin
          et = pal ? pl_type[0] : nt_type[0];
          for (int k = 0; k < 15; k++)
            if (exp_line >= (pal ? pl_line[k] : nt_line[k])) et = pal ? pl_type[k] : nt_type[k];
          checks++;
          if (int'(line_no) != exp_line || ltype != et
              || field != (exp_line > (pal ? 312 : 262))) begin
            failures++;
            if (failures < 10) $display("%s line %0d: line_no %0d type %s expected %s",
                                        pal ? "PAL" : "NTSC", exp_line, line_no, ltype.name(), et.name());
          end
        end
        pixel_edge();
      end
      exp_line = (exp_line == total) ? 1 : exp_line + 1;
    end
    line_start = 1'b0;
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
