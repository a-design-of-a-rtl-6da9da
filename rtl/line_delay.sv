// One-line (1H) delay buffer of the letter-box converter.
//
// A circular buffer of DEPTH words: every enabled clock the word written
// DEPTH enabled clocks earlier is read out and the new word takes its place,
// so dout carries the previous line's pixel at the same horizontal position
// as the pixel now entering. In PALplus mode the letter-box converter runs on
// its own 18 MHz clock with a fixed 1152 pixels per line, which sets DEPTH.
//
// Interface: clk, asynchronous active-low rst_n (resets the pointer only),
// en (a pixel is present on din), din, dout.
// Timing: dout is registered; it shows the word written DEPTH enables before
// the din sampled on the same edge, one clock after that edge. The buffer is
// a plain addressed memory; the document calls its buffer bit-serial, which
// describes an implementation detail this design does not copy.
module line_delay #(
  parameter int unsigned DEPTH = 1152,
  parameter int unsigned W     = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   ptr <= '0;
    else if (en)  ptr <= (32'(ptr) == DEPTH - 1) ? '0 : ptr + 1'b1;

  always_ff @(posedge clk)
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
endmodule
