// frc_dither: frame rate control, 8-bit colour on a 6-bit panel driver.
//
// Each 8-bit component is shown as its upper six bits plus 0 or 1. Whether the
// 1 is added depends on the two dropped LSBs and on a rank r in 0..3 given by
// the pixel's place in a 2x2 window (column parity x0, line parity y0) and the
// frame phase f (0..3):
//
//     r = base(y0,x0) XOR f,   base(0,0)=2, base(0,1)=0, base(1,0)=1, base(1,1)=3
//     out = min(in[7:2] + (in[1:0] > r), 63)
//
// Every frame holds each rank once per 2x2 window and every pixel takes each
// rank once per four frames, so the displayed level averages to in/4 both over
// the window (spatial) and over four frames (temporal). For LSBs 10 the
// upper-left pixel shows +0,+0,+1,+1 over frames 0..3 and the window is a
// checkerboard, matching the 128/132 example for an input of 130. The result
// saturates at 63, so inputs 252..255 all show as 252. The rank table is this
// design's choice of a pattern with those properties; the same rank is used
// for R, G and B. en low truncates to the upper six bits.
//
// Timing: one register stage; in and the position bits belong to the same
// pixel.
module frc_dither
  import tcon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       x0,
  input  logic       y0,
  input  logic [1:0] frame,
  input  rgb8_t      rgb_in,
  output rgb6_t      rgb_out
);

  logic [1:0] base, rank;

  always_comb begin
    unique case ({y0, x0})
      2'b00: base = 2'd2;
      2'b01: base = 2'd0;
      2'b10: base = 2'd1;
      2'b11: base = 2'd3;
    endcase
    rank = base ^ frame;
  end

  function automatic logic [5:0] dither(input logic [7:0] c, input logic [1:0] r,
                                        input logic on);
    logic inc;
    inc = on && (c[1:0] > r) && (c[7:2] != 6'h3F);
    return c[7:2] + {5'd0, inc};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rgb_out <= '0;
    else begin
      rgb_out.r <= dither(rgb_in.r, rank, en);
      rgb_out.g <= dither(rgb_in.g, rank, en);
      rgb_out.b <= dither(rgb_in.b, rank, en);
    end
  end

endmodule
