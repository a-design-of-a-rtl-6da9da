// Testbench for enc_regs: writes every register while reset is low, checks
// each decoded field, then checks that writes with reset high are ignored.
module tb_enc_regs;
  import enc_pkg::*;
  logic xclk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [23:0] data = '0;
  cfg_t cfg;
  logic [23:0] shadow [14];
  int checks = 0, failures = 0;

  enc_regs dut (.xclk (xclk), .rst_n (rst_n), .prog_we (we), .prog_addr (addr),
                .prog_data (data), .cfg (cfg));

  always #5 xclk = ~xclk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string name, input logic [23:0] got, input logic [23:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", name, got, exp);
    end
  endtask

  task automatic write(input int a, input logic [23:0] d);
    @(negedge xclk);
    we = 1'b1; addr = 4'(a); data = d;
    @(negedge xclk);
    we = 1'b0;
  endtask

  task automatic check_all();
    chk("hcount", 24'(cfg.t.hcount), 24'(shadow[0][22:12]));
    chk("fp",     24'(cfg.t.fp),     24'(shadow[0][10:0]));
    chk("sy",     24'(cfg.t.sy),     24'(shadow[1][22:12]));
    chk("br",     24'(cfg.t.br),     24'(shadow[1][10:0]));
    chk("bu",     24'(cfg.t.bu),     24'(shadow[2][22:12]));
    chk("cbp",    24'(cfg.t.cbp),    24'(shadow[2][10:0]));
    chk("va",     24'(cfg.t.va),     24'(shadow[3][22:12]));
    chk("sl",     24'(cfg.t.sl),     24'(shadow[3][10:0]));
    chk("sh",     24'(cfg.t.sh),     24'(shadow[4][22:12]));
    chk("el",     24'(cfg.t.el),     24'(shadow[4][10:0]));
    chk("eh",     24'(cfg.t.eh),     24'(shadow[5][22:12]));
    chk("sync",   24'(cfg.l.sync_lvl),  24'(shadow[5][9:0]));
    chk("blank",  24'(cfg.l.blank_lvl), 24'(shadow[6][21:12]));
    chk("black",  24'(cfg.l.black_lvl), 24'(shadow[6][9:0]));
    chk("ygain",  24'(cfg.l.y_gain),    24'(shadow[7][19:12]));
    chk("burst",  24'($unsigned(cfg.l.burst_amp)), 24'(shadow[7][7:0]));
    chk("p1",     24'(cfg.s.p1),        24'(shadow[8][10:0]));
    chk("p2",     24'(cfg.s.p2),        24'(shadow[9][15:0]));
    chk("p3",     24'(cfg.s.p3),        24'(shadow[10][15:0]));
    chk("padj",   24'(cfg.s.phase_adj), 24'(shadow[11][10:0]));
    chk("mode",   24'({cfg.m.palplus, cfg.m.rgb_in, cfg.m.pal_op}), 24'(shadow[12][2:0]));
    chk("ugain",  24'(cfg.l.u_gain),    24'(shadow[13][19:12]));
    chk("vgain",  24'(cfg.l.v_gain),    24'(shadow[13][7:0]));
  endtask

  initial begin
    for (int round = 0; round < 3; round++) begin
      rst_n = 1'b0;
      for (int a = 0; a < 14; a++) begin
        shadow[a] = 24'($urandom);
        write(a, shadow[a]);
      end
      @(negedge xclk);
      check_all();
      // released from reset: writes must not change anything
      rst_n = 1'b1;
      for (int a = 0; a < 14; a++) write(a, ~shadow[a]);
      @(negedge xclk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
