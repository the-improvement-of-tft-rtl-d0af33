// col_drv_timing: control signals for the column (source) drivers.
//
//  STH  start pulse for the first column driver, one clock wide, issued with
//       the first pixel of every data line so the driver chain starts
//       sampling data.
//  TP   load/transfer pulse. Its leading edge makes the drivers latch the
//       line held in their data registers, its trailing edge starts the D/A
//       outputs. Edges are programmable (cfg.tp_rise/tp_fall, pixel clocks from
//       the line start, on the 16-bit line timer) because the right moment
//       depends on the gate bus-line delay of each panel process. One TP per
//       data line (lines 0 .. v_active-1).
//  POL  polarity of the driver outputs, updated at the TP leading edge. For
//       line and pixel inversion it alternates every line and every frame; for
//       frame and column inversion it alternates every frame only (the
//       alternation between neighbouring columns is done inside the driver).
//
// The three signals and their roles follow the design; one-clock STH, the
// position reference of TP and the POL update moment are this design's own.
// Timing: outputs are registered, one clock after pos.
module col_drv_timing
  import tcon_pkg::*;
#(
  parameter int TW = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  tcon_pos_t pos,
  input  tcon_cfg_t cfg,
  output logic      sth,
  output logic      tp,
  output logic      pol
);

  logic [TW-1:0] t;
  logic data_line, line_mode;

  always_comb begin
    t         = TW'(pos.t);
    data_line = pos.locked && (pos.v < cfg.v_active);
    line_mode = (cfg.inv_mode == INV_LINE) || (cfg.inv_mode == INV_PIXEL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sth <= 1'b0;
      tp  <= 1'b0;
      pol <= 1'b0;
    end else begin
      sth <= pos.locked && pos.de && pos.line_start;
      tp  <= data_line && (t >= TW'(cfg.tp_rise)) && (t < TW'(cfg.tp_fall));
      if (data_line && t == TW'(cfg.tp_rise))
        pol <= pos.frame[0] ^ (line_mode & pos.v[0]);
    end
  end

endmodule
