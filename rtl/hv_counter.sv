// hv_counter: pixel, line and frame position derived from the input DE alone.
//
// Each rising edge of DE starts a line. A line timer t counts pixel clocks from
// the line start (TW bits, saturating); when it reaches cfg.h_total without a
// new DE edge the counter starts a line of its own, so that line timing keeps
// running through vertical blanking, and marks the frame as blanking. The
// first DE edge after such a blank line is line 0 of a new frame: v restarts,
// the 2-bit frame counter advances and locked goes high (it stays low from
// reset until the first blank has been seen, so the driver timing never starts
// in the middle of a frame). h counts active pixels within the line (H_W bits),
// v counts lines including blank ones (V_W bits, saturating).
//
// Counting lines by DE follows the design; the DE-only frame detection, which
// needs DE lines to be exactly h_total clocks apart, is this design's choice.
// H_W and V_W are 11 rather than 10 so that the 1280-pixel, 1066-line SXGA
// timing fits.
//
// Timing: pos describes the pixel that was on de one clock earlier (one
// register stage). en low (configuration not loaded) holds the block in reset.
module hv_counter
  import tcon_pkg::*;
#(
  parameter int H_W = 11,
  parameter int V_W = 11,
  parameter int TW  = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      de,
  input  tcon_cfg_t cfg,
  output tcon_pos_t pos
);

  logic          de_d;
  logic [TW-1:0] t;
  logic [H_W-1:0] h;
  logic [V_W-1:0] v;
  logic [1:0]    frame;
  logic          vblank, locked;

  logic rise, synth, start;
  logic [TW-1:0] t_inc;

  always_comb begin
    t_inc = (t == '1) ? t : t + 1'b1;
    rise  = de && !de_d;
    synth = !rise && !de && (TW'(t_inc) >= TW'(cfg.h_total));
    start = rise || synth;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_d   <= 1'b0;
      t      <= '0;
      h      <= '0;
      v      <= '0;
      frame  <= '0;
      vblank <= 1'b0;
      locked <= 1'b0;
      pos    <= '0;
    end else if (!en) begin
      de_d   <= 1'b0;
      t      <= '0;
      h      <= '0;
      v      <= '0;
      frame  <= '0;
      vblank <= 1'b0;
      locked <= 1'b0;
      pos    <= '0;
    end else begin
      de_d <= de;
      pos.line_start  <= start;
      pos.frame_start <= 1'b0;
      pos.de          <= de && locked_next(rise, vblank, locked);
      if (start) begin
        t <= '0;
        h <= '0;
        pos.t <= '0;
        pos.h <= '0;
        if (rise && vblank) begin
          v      <= '0;
          frame  <= frame + 1'b1;
          vblank <= 1'b0;
          locked <= 1'b1;
          pos.v  <= '0;
          pos.frame <= frame + 1'b1;
          pos.frame_start <= 1'b1;
        end else begin
          if (v != '1) v <= v + 1'b1;
          if (synth) vblank <= 1'b1;
          pos.v <= (v != '1) ? 16'(v) + 16'd1 : 16'(v);
          pos.frame <= frame;
        end
      end else begin
        t <= t_inc;
        if (de && h != '1) h <= h + 1'b1;
        pos.t <= 16'(t_inc);
        pos.h <= (de && h != '1) ? 16'(h) + 16'd1 : 16'(h);
        pos.v <= 16'(v);
        pos.frame <= frame;
      end
      pos.locked <= locked_next(rise, vblank, locked);
    end
  end

  function automatic logic locked_next(input logic r, input logic vb, input logic lk);
    return lk || (r && vb);
  endfunction

endmodule
