// tcon_top_tb: end-to-end test of the timing controller on a small 16 x 8
// raster (24 x 11 total) with a fast I2C clock: EEPROM load with retry, six
// frames in pixel inversion (one in 6-bit LVDS format, one with FRC off),
// then a reset, a reload with column inversion and two more frames. All
// checks are in tcon_env.
`timescale 1ns/1ps
module tcon_top_tb;
  logic            clk, rst_n, lvds_mode8, frc_en, scl_i, sda_i, scl_oe, sda_oe, cfg_done;
  logic [3:0][6:0] lvds_rx;
  logic [7:0]      cfg_retries;
  logic            sth, tp, pol, stv, ckv, oe;
  logic [8:0]      rsds_rise, rsds_fall;

  tcon_top #(.I2C_QUARTER(4)) dut (.*);
  tcon_env #(.FRAMES(6), .TWO_RUNS(1), .WATCHDOG(64'd2_000_000)) env (.*);
endmodule
