// Testbench for letterbox: feeds an odd field, an even field and a
// progressive picture of short random lines and checks every frame memory
// write (address and data) against the 4:3 decimation weights computed here
// with exact integer division, and that lines without output write nothing.
module tb_letterbox;
  localparam int LP = 12;      // pixels per line (short lines for simulation)
  localparam int NL = 8;       // lines per field (two groups of four)
  logic clk = 1'b0, rst_n = 1'b0;
  logic line_start = 0, field_start = 0, field_id = 0, progressive = 0, helper_en = 0, valid = 0;
  logic [23:0] din = '0;
  logic fm_wr, fm_helper;
  logic [19:0] fm_addr;
  logic [23:0] fm_data;
  int checks = 0, failures = 0;

  letterbox #(.LINE_PIXELS (LP), .AW (20)) dut (
    .clk (clk), .rst_n (rst_n), .line_start (line_start), .field_start (field_start),
    .field_id (field_id), .progressive (progressive), .helper_en (helper_en),
    .valid (valid), .din (din), .fm_wr (fm_wr), .fm_addr (fm_addr),
    .fm_data (fm_data), .fm_helper (fm_helper)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] pic [NL][LP];
  logic [23:0] expq [$];
  int          exp_addr [$];

  // expected output for line l (0-based) of a field
  function automatic logic [7:0] weight(input bit even, input int l, input int p, input int c);
    int prv, cur;
    cur = pic[l][p][8*c +: 8];
    prv = (l > 0) ? pic[l-1][p][8*c +: 8] : 0;
    if (!even) case (l % 4)
      0: return 8'(cur);
      2: return 8'((2*prv + cur) / 3);
      3: return 8'((prv + 2*cur) / 3);
      default: return 8'd0;
    endcase
    else case (l % 4)
      1: return 8'((5*prv + cur) / 6);
      2: return 8'((prv + cur) / 2);
      3: return 8'((prv + 5*cur) / 6);
      default: return 8'd0;
    endcase
  endfunction

  function automatic bit has_out(input bit even, input int l);
    return even ? (l % 4 != 0) : (l % 4 != 1);
  endfunction

  int writes = 0, nowrite_lines = 0;

  // monitor
  always @(posedge clk) if (rst_n && fm_wr) begin
    checks++;
    writes++;
    if (expq.size() == 0) begin
      failures++; $display("unexpected write");
    end else begin
      logic [23:0] e; int a;
      e = expq.pop_front(); a = exp_addr.pop_front();
      if (fm_data !== e || int'(fm_addr) != a) begin
        failures++;
        if (failures < 10) $display("write: addr %0d data %h, expected addr %0d data %h", fm_addr, fm_data, a, e);
      end
    end
  end

  task automatic run_field(input bit fid, input bit prog);
    bit even;
    int addr;
    even = fid & ~prog;
    addr = 0;
    for (int l = 0; l < NL; l++)
      for (int p = 0; p < LP; p++) pic[l][p] = 24'($urandom);
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      line_start = 1; field_start = (l == 0); field_id = fid; progressive = prog;
      @(negedge clk);
      line_start = 0; field_start = 0;
      if (has_out(even, l)) begin
        for (int p = 0; p < LP; p++) begin
          logic [23:0] e;
          for (int c = 0; c < 3; c++) e[8*c +: 8] = weight(even, l, p, c);
          expq.push_back(e); exp_addr.push_back(addr); addr++;
        end
      end else nowrite_lines++;
      for (int p = 0; p < LP; p++) begin
        valid = 1; din = pic[l][p];
        @(negedge clk);
        // random idle cycles inside the line
        if ($urandom_range(0, 4) == 0) begin valid = 0; @(negedge clk); end
      end
      valid = 0;
      repeat (5) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_field(1'b0, 1'b0);
    run_field(1'b1, 1'b0);
    run_field(1'b1, 1'b1);   // progressive: odd weights even if field_id = 1
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("%0d expected writes missing", expq.size());
    end
    checks++;
    if (writes != 3 * (NL * 3 / 4) * LP) begin
      failures++; $display("writes %0d", writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
