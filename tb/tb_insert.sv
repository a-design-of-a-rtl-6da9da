// Testbench for insert: random segments, luminance values and level
// registers; the luma output one pixel clock later must be the selected
// level, or black + (Y - 16) * gain / 64 clamped to 0..1023 in the picture
// window of an active line.
module tb_insert;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, ce;
  seg_t seg = SEG_BLANK;
  logic [7:0] y = '0;
  levels_t lv = '0;
  logic [9:0] luma;
  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  clk_div u_div (.xclk (xclk), .rst_n (rst_n), .ce (ce), .clk ());
  insert dut (.xclk (xclk), .rst_n (rst_n), .ce (ce), .seg (seg), .y (y), .lv (lv), .luma (luma));

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

  initial begin
    repeat (4) @(posedge xclk);
    rst_n = 1'b1;
    pixel_edge();
    for (int i = 0; i < 5000; i++) begin
      int e, v;
      seg = seg_t'($urandom_range(0, 4));
      y = 8'($urandom);
      if (i % 100 == 0) begin
        lv.sync_lvl = 10'($urandom); lv.blank_lvl = 10'($urandom);
        lv.black_lvl = 10'($urandom); lv.y_gain = 8'($urandom);
        lv.burst_amp = 8'($urandom);
      end
      case (seg)
        SEG_SYNC:  e = lv.sync_lvl;
        SEG_BLACK: e = lv.black_lvl;
        SEG_ACTIVE: begin
          v = int'(lv.black_lvl) + ((int'(y) - 16) * int'(lv.y_gain)) / 64;
          // arithmetic shift rounds towards minus infinity
          if ((int'(y) - 16) * int'(lv.y_gain) < 0 && ((int'(y) - 16) * int'(lv.y_gain)) % 64 != 0) v--;
          e = v < 0 ? 0 : v > 1023 ? 1023 : v;
        end
        default:   e = lv.blank_lvl;
      endcase
      seen[int'(seg)]++;
      pixel_edge();
      checks++;
      if (int'(luma) != e) begin
        failures++;
        if (failures < 10) $display("seg %s y %0d: luma %0d expected %0d", seg.name(), y, luma, e);
      end
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
