// tcon_top_full_tb: the timing controller with all parameters at their
// defaults (100 kHz I2C from a 108 MHz pixel clock) on SXGA 60 Hz timing:
// 1280 x 1024 active pixels in a 1688 x 1066 raster. The EEPROM image holds
// that timing with TP at 1290..1330, CKV at 1400..1600 and OE at 1380..1450
// pixel clocks into the line. Four frames are sent (frame 2 in 6-bit LVDS
// format, frame 3 with FRC off); every pixel and control signal is checked by
// tcon_env.
`timescale 1ns/1ps
module tcon_top_full_tb;
  logic            clk, rst_n, lvds_mode8, frc_en, scl_i, sda_i, scl_oe, sda_oe, cfg_done;
  logic [3:0][6:0] lvds_rx;
  logic [7:0]      cfg_retries;
  logic            sth, tp, pol, stv, ckv, oe;
  logic [8:0]      rsds_rise, rsds_fall;

  tcon_top dut (.*);
  tcon_env #(
    .HA(1280), .VA(1024), .HT(1688), .VT(1066), .FRAMES(4),
    .TPR(1290), .TPF(1330), .CKR(1400), .CKF(1600), .OER(1380), .OEF(1450),
    .TWO_RUNS(0), .WATCHDOG(64'd12_000_000)
  ) env (.*);
endmodule
