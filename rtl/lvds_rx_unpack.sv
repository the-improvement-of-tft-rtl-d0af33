// lvds_rx_unpack: pixel data from de-serialised LVDS lane words.
//
// An LVDS link sends seven bits per lane in each pixel clock. After the
// receiver has de-serialised them, rx[k][6] is the first bit slot of the cycle
// on lane k and rx[k][0] the last. The slots carry (first to last):
//
//   lane 0: G0 R5 R4 R3 R2 R1 R0
//   lane 1: B1 B0 G5 G4 G3 G2 G1
//   lane 2: DE VS HS B5 B4 B3 B2
//   lane 3: -- B7 B6 G7 G6 R7 R6      (8-bit format only)
//
// With mode8 high the four-lane 8-bit format is decoded; with mode8 low lane 3
// is ignored and the six bits become the upper bits of each 8-bit component
// (this fill with zero LSBs is this design's choice). The analog receiver and
// the bit-clock recovery are outside this block. Timing: one register stage.
module lvds_rx_unpack
  import tcon_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0][6:0] rx,
  input  logic            mode8,
  output rgb8_t           rgb,
  output logic            de,
  output logic            vs,
  output logic            hs
);

  logic [5:0] r6, g6, b6;
  logic [1:0] r_hi, g_hi, b_hi;

  always_comb begin
    r6   = rx[0][5:0];
    g6   = {rx[1][4:0], rx[0][6]};
    b6   = {rx[2][3:0], rx[1][6:5]};
    r_hi = rx[3][1:0];
    g_hi = rx[3][3:2];
    b_hi = rx[3][5:4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb <= '0;
      de  <= 1'b0;
      vs  <= 1'b0;
      hs  <= 1'b0;
    end else begin
      de <= rx[2][6];
      vs <= rx[2][5];
      hs <= rx[2][4];
      if (mode8) begin
        rgb.r <= {r_hi, r6};
        rgb.g <= {g_hi, g6};
        rgb.b <= {b_hi, b6};
      end else begin
        rgb.r <= {r6, 2'b00};
        rgb.g <= {g6, 2'b00};
        rgb.b <= {b6, 2'b00};
      end
    end
  end

endmodule
