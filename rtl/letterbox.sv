// Letter-box converter: vertical 4:3 decimation for PALplus.
//
// A 16:9 picture is squeezed vertically so that it fills 3/4 of the lines of
// a 4:3 screen. Every group of four input lines yields three output lines,
// each computed from the line now arriving (cur) and the previous line held
// in a one-line delay (prev), with these weights (A..D odd field lines,
// E..H even field lines):
//
//   odd field   line 1: A                line 2: no output
//               line 3: (2B + C) / 3     line 4: (C + 2D) / 3
//   even field  line 1: no output        line 2: (5E + F) / 6
//               line 3: (F + G) / 2      line 4: (G + 5H) / 6
//
// Only adders and shifters are used. The numerator is built in three
// pipelined adder stages, s1 = m1 + m2, s2 = (s1 or 2*s1) + m3,
// s3 = s2 + m4, with each operand selected from {0, prev, cur} by the
// select signals of the current line; every weight above is written in this
// form with a denominator of 3 or 6 (for example (5E+F)/6 = ((E+E)*2+E+F)/6).
// The division by 3 is a multiplication by 2731/8192 (exact for all
// numerators up to 6*255), and /6 is /3 followed by a one-bit right shift.
// A progressive picture uses the odd-field weights on every line.
//
// Output lines are written to an external frame memory: fm_wr is high for
// pixels of a line that yields an output, and fm_addr increments with every
// written pixel (it does not move when fm_wr is low) and restarts at zero at
// each field start. helper_en marks the written pixel as a helper (non-active)
// pixel; it travels with the data as fm_helper.
//
// Interface (clk is the letter-box converter's own pixel clock):
//   line_start   pulse, one clock, before the first pixel of each input line
//   field_start  with line_start: this line is the first of a field
//   field_id     0: odd field, 1: even field (sampled at line_start)
//   progressive  1: apply the odd-field weights to every line
//   valid, din   input pixel, three 8-bit components {c2, c1, c0}
// Timing: a pixel entering with valid is written three clocks later (the
// one-line delay read adds one clock in front of the three adder stages).
// The weights and the three-stage adder pipeline follow the document; the
// exact operand encoding of each stage is this design's.
module letterbox #(
  parameter int unsigned LINE_PIXELS = 1152,
  parameter int unsigned AW          = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          line_start,
  input  logic          field_start,
  input  logic          field_id,
  input  logic          progressive,
  input  logic          helper_en,
  input  logic          valid,
  input  logic [23:0]   din,
  output logic          fm_wr,
  output logic [AW-1:0] fm_addr,
  output logic [23:0]   fm_data,
  output logic          fm_helper
);
  // Operand selects.
  typedef enum logic [1:0] {OP_ZERO = 2'd0, OP_PREV = 2'd1, OP_CUR = 2'd2} op_t;

  typedef struct packed {
    logic wr;    // this line yields an output line
    op_t  m1;
    op_t  m2;
    logic shl;   // stage 2 doubles s1
    op_t  m3;
    op_t  m4;
    logic div6;  // denominator 6 (else 3)
  } lbctl_t;

  // Line phase within the group of four and field of the current line.
  logic [1:0] phase;
  logic       even;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= 2'd3;
      even  <= 1'b0;
    end else if (line_start) begin
      phase <= field_start ? 2'd0 : phase + 2'd1;
      if (field_start) even <= field_id & ~progressive;
    end

  function automatic lbctl_t decode(input logic ev, input logic [1:0] ph);
    lbctl_t c;
    c = '{wr: 1'b0, m1: OP_ZERO, m2: OP_ZERO, shl: 1'b0,
          m3: OP_ZERO, m4: OP_ZERO, div6: 1'b0};
    unique case ({ev, ph})
      3'b0_00: c = '{1'b1, OP_CUR,  OP_CUR,  1'b1, OP_CUR,  OP_CUR,  1'b1}; // 6A/6
      3'b0_01: c.wr = 1'b0;                                                  // B: none
      3'b0_10: c = '{1'b1, OP_PREV, OP_CUR,  1'b0, OP_PREV, OP_ZERO, 1'b0}; // (2B+C)/3
      3'b0_11: c = '{1'b1, OP_CUR,  OP_CUR,  1'b0, OP_PREV, OP_ZERO, 1'b0}; // (C+2D)/3
      3'b1_00: c.wr = 1'b0;                                                  // E: none
      3'b1_01: c = '{1'b1, OP_PREV, OP_PREV, 1'b1, OP_PREV, OP_CUR,  1'b1}; // (5E+F)/6
      3'b1_10: c = '{1'b1, OP_PREV, OP_CUR,  1'b1, OP_PREV, OP_CUR,  1'b1}; // (F+G)/2
      3'b1_11: c = '{1'b1, OP_CUR,  OP_CUR,  1'b1, OP_PREV, OP_CUR,  1'b1}; // (G+5H)/6
      default: ;
    endcase
    return c;
  endfunction

  // One-line delay; cur is registered to line up with the delay's read data.
  logic [23:0] prev0, cur0;
  logic        v0;
  lbctl_t      c0;

  line_delay #(.DEPTH(LINE_PIXELS), .W(24)) u_1h (
    .clk (clk), .rst_n (rst_n), .en (valid), .din (din), .dout (prev0)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v0   <= 1'b0;
      cur0 <= '0;
      c0   <= '0;
    end else begin
      v0   <= valid;
      if (valid) cur0 <= din;
      c0   <= decode(even, phase);
    end

  function automatic logic [7:0] pick(input op_t op, input logic [7:0] p, input logic [7:0] c);
    case (op)
      OP_PREV: return p;
      OP_CUR:  return c;
      default: return 8'd0;
    endcase
  endfunction

  // Three adder stages per component.
  logic [23:0] prev1, cur1, prev2, cur2;
  logic [9:0]  s1 [3];
  logic [10:0] s2 [3];
  logic        v1, v2;
  lbctl_t      c1, c2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; c1 <= '0; c2 <= '0;
      prev1 <= '0; cur1 <= '0; prev2 <= '0; cur2 <= '0;
      for (int i = 0; i < 3; i++) begin
        s1[i] <= '0;
        s2[i] <= '0;
      end
    end else begin
      v1 <= v0; c1 <= c0; prev1 <= prev0; cur1 <= cur0;
      v2 <= v1; c2 <= c1; prev2 <= prev1; cur2 <= cur1;
      for (int i = 0; i < 3; i++) begin
        // stage 1: adder_1
        s1[i] <= 10'(pick(c0.m1, prev0[8*i +: 8], cur0[8*i +: 8]))
               + 10'(pick(c0.m2, prev0[8*i +: 8], cur0[8*i +: 8]));
        // stage 2: optional shift left, adder_2
        s2[i] <= (c1.shl ? {s1[i], 1'b0} : {1'b0, s1[i]})
               + 11'(pick(c1.m3, prev1[8*i +: 8], cur1[8*i +: 8]));
      end
    end

  // Stage 3: adder_3, divide by 3, optional shift right, write.
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fm_wr     <= 1'b0;
      fm_data   <= '0;
      fm_helper <= 1'b0;
      addr_q    <= '0;
      fm_addr   <= '0;
    end else begin
      fm_wr <= v2 && c2.wr;
      if (v2 && c2.wr) begin
        for (int i = 0; i < 3; i++) begin
          logic [10:0] s3;
          logic [23:0] prod;
          logic [7:0]  q;
          s3   = s2[i] + 11'(pick(c2.m4, prev2[8*i +: 8], cur2[8*i +: 8]));
          prod = 24'(s3) * 24'd2731;
          q    = 8'(prod >> (c2.div6 ? 14 : 13));
          fm_data[8*i +: 8] <= q;
        end
        fm_helper <= helper_en;
        fm_addr   <= addr_q;
        addr_q    <= addr_q + 1'b1;
      end
      if (line_start && field_start) addr_q <= '0;
    end
endmodule
