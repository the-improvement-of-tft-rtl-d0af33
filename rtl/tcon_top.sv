// tcon_top: programmable TFT-LCD timing controller with frame rate control.
//
// After reset the controller reads its panel timing (active size, line period,
// TP, CKV and OE edges, inversion scheme, FRC default) from an external I2C
// EEPROM (cfg_loader). From then on it follows the incoming video: the LVDS
// lane words are decoded to RGB and DE (lvds_rx_unpack), DE drives the pixel,
// line and frame counters (hv_counter), and from the position the column
// driver signals STH/TP/POL (col_drv_timing) and row driver signals
// STV/CKV/OE (row_drv_timing) are generated. The 8-bit colour is reduced to
// the 6 bits of the drivers by frame rate control (frc_dither) and laid out as
// RSDS pair bits (rsds_tx_map). Until the timing is loaded all driver outputs
// stay low.
//
// Pipeline (clocks after the LVDS word): decode 1, position 2, dither and
// driver timing 3, RSDS data 4; the driver controls get one extra register so
// that STH leaves together with the first pixel of its line. FRC is on when
// the frc_en pin or the EEPROM's FRC bit is set.
//
// Interface: clk is the pixel clock; scl/sda are open drain (x_oe = 1 pulls
// the line low, x_i is the line level); cfg_retries counts restarted EEPROM
// loads; rsds_rise/rsds_fall are the first and
// second half-clock bits of the nine RSDS pairs (R0..R2, G0..G2, B0..B2). The
// analog LVDS receiver, RSDS transmitter, EEPROM and the driver ICs are outside.
module tcon_top
  import tcon_pkg::*;
#(
  parameter int         I2C_QUARTER = 270,
  parameter logic [6:0] DEV_ADDR    = 7'h50,
  parameter int         H_W         = 11,
  parameter int         V_W         = 11,
  parameter int         TW          = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0][6:0] lvds_rx,
  input  logic            lvds_mode8,
  input  logic            frc_en,
  output logic            scl_oe,
  output logic            sda_oe,
  input  logic            scl_i,
  input  logic            sda_i,
  output logic            cfg_done,
  output logic [7:0]      cfg_retries,
  output logic            sth,
  output logic            tp,
  output logic            pol,
  output logic            stv,
  output logic            ckv,
  output logic            oe,
  output logic [8:0]      rsds_rise,
  output logic [8:0]      rsds_fall
);

  tcon_cfg_t  cfg;
  rgb8_t      rgb1, rgb2;
  logic       de1, vs1, hs1;
  tcon_pos_t  pos;
  rgb6_t      rgb3;
  logic       sth3, tp3, pol3, stv3, ckv3, oe3;

  cfg_loader #(.QUARTER(I2C_QUARTER), .DEV_ADDR(DEV_ADDR)) u_cfg (
    .clk, .rst_n, .cfg, .cfg_done, .retries(cfg_retries), .scl_oe, .sda_oe, .scl_i, .sda_i
  );

  lvds_rx_unpack u_rx (
    .clk, .rst_n, .rx(lvds_rx), .mode8(lvds_mode8), .rgb(rgb1), .de(de1), .vs(vs1), .hs(hs1)
  );

  hv_counter #(.H_W(H_W), .V_W(V_W), .TW(TW)) u_hv (
    .clk, .rst_n, .en(cfg_done), .de(de1), .cfg, .pos
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rgb2 <= '0;
    else        rgb2 <= rgb1;
  end

  frc_dither u_frc (
    .clk, .rst_n, .en(frc_en | cfg.frc_en), .x0(pos.h[0]), .y0(pos.v[0]),
    .frame(pos.frame), .rgb_in(rgb2), .rgb_out(rgb3)
  );

  col_drv_timing #(.TW(TW)) u_col (
    .clk, .rst_n, .pos, .cfg, .sth(sth3), .tp(tp3), .pol(pol3)
  );

  row_drv_timing #(.TW(TW)) u_row (
    .clk, .rst_n, .pos, .cfg, .stv(stv3), .ckv(ckv3), .oe(oe3)
  );

  rsds_tx_map #(.BITS(6)) u_rsds (
    .clk, .rst_n, .r(rgb3.r), .g(rgb3.g), .b(rgb3.b), .rise(rsds_rise), .fall(rsds_fall)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {sth, tp, pol, stv, ckv, oe} <= '0;
    else        {sth, tp, pol, stv, ckv, oe} <= {sth3, tp3, pol3, stv3, ckv3, oe3};
  end

endmodule
