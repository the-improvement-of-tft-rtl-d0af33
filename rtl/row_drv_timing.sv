// row_drv_timing: control signals for the row (gate) drivers.
//
//  STV  start pulse for the first row driver. It changes at the CKV falling
//       edge: it rises at the CKV fall position of line 0 and falls at the CKV
//       fall position of line 1, so exactly one CKV rising edge (in line 1)
//       shifts it into the gate driver chain.
//  CKV  vertical shift clock, one pulse in every line from line 1 on, blanking
//       lines included, rising at cfg.ckv_rise and falling at cfg.ckv_fall.
//       Gate line n is selected during line n (the CKV of line 1 shifts STV
//       into the first stage), i.e. the line after TP latched the data of
//       line n-1. The pulses in the blanking lines, which the line counter
//       generates itself, shift the token out of the last gate driver, so no
//       gate line stays on through vertical blanking.
//  OE   output disable window, high from cfg.oe_rise to cfg.oe_fall in the
//       same lines, used to turn the previous gate line off before the next one
//       turns on (gate bus-line delay), so two gate lines are never on together.
//
// The signal set and the need for programmable CKV/OE edges follow the design;
// the line latency and OE polarity (high = outputs off) are this design's own.
// Edges are pixel clocks from the line start on the 16-bit line timer and need
// ckv_rise < ckv_fall < h_total. Timing: outputs registered, one clock after pos.
module row_drv_timing
  import tcon_pkg::*;
#(
  parameter int TW = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  tcon_pos_t pos,
  input  tcon_cfg_t cfg,
  output logic      stv,
  output logic      ckv,
  output logic      oe
);

  logic [TW-1:0] t;
  logic gate_line;

  always_comb begin
    t         = TW'(pos.t);
    gate_line = pos.locked && (pos.v >= 16'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stv <= 1'b0;
      ckv <= 1'b0;
      oe  <= 1'b0;
    end else begin
      stv <= pos.locked &&
             ((pos.v == 16'd0 && t >= TW'(cfg.ckv_fall)) ||
              (pos.v == 16'd1 && t <  TW'(cfg.ckv_fall)));
      ckv <= gate_line && (t >= TW'(cfg.ckv_rise)) && (t < TW'(cfg.ckv_fall));
      oe  <= gate_line && (t >= TW'(cfg.oe_rise))  && (t < TW'(cfg.oe_fall));
    end
  end

endmodule
