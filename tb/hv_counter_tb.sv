// hv_counter_tb: a video generator with a known raster (HA x VA active,
// HT x VT total) drives DE, starting in the middle of a frame. A reference
// built from the generator's own coordinates predicts the position one clock
// later: no lock before the first vertical blank, then t and h equal the
// generator column, v the generator row (including blank rows), frame_start on
// (0,0) and the frame counter advancing once per frame.
`timescale 1ns/1ps
module hv_counter_tb;
  import tcon_pkg::*;

  localparam int HA = 10, HT = 16, VA = 6, VT = 9;

  logic clk = 0, rst_n = 0, en = 0, de = 0;
  always #5 clk = ~clk;

  tcon_cfg_t cfg;
  tcon_pos_t pos;

  hv_counter dut (.clk, .rst_n, .en, .de, .cfg, .pos);

  int checks = 0, failures = 0;
  int gx, gy, px, py, frames_seen = 0, fs_seen = 0, blank_lines = 0;
  bit plock = 0, locked_seen = 0;
  logic [1:0] fr_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (gx=%0d gy=%0d)", what, px, py);
    end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.h_active = 16'(HA);
    cfg.v_active = 16'(VA);
    cfg.h_total  = 16'(HT);
    gx = 5; gy = 2;                     // start mid-frame
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int n = 0; n < 4 * HT * VT; n++) begin
      de = (gx < HA) && (gy < VA);
      px = gx; py = gy;
      @(negedge clk);
      // pos now describes the pixel (px, py)
      if (plock) begin
        check(pos.locked, "locked");
        check(pos.t == 16'(px), $sformatf("t=%0d", pos.t));
        check(pos.v == 16'(py), $sformatf("v=%0d", pos.v));
        check(pos.de == ((px < HA) && (py < VA)), "de");
        if (px < HA && py < VA) check(pos.h == 16'(px), $sformatf("h=%0d", pos.h));
        check(pos.line_start == (px == 0), "line_start");
        check(pos.frame_start == (px == 0 && py == 0), "frame_start");
        check(pos.frame == fr_ref, "frame counter");
        if (px == 0 && py >= VA) blank_lines++;
      end else begin
        check(!pos.locked && !pos.de, "no lock before first blank");
      end
      if (pos.frame_start) begin
        fs_seen++;
        if (!plock) fr_ref = pos.frame;
      end
      gx++;
      if (gx == HT) begin
        gx = 0;
        gy++;
        if (gy == VT) begin
          gy = 0;
          plock = 1;
          if (locked_seen) fr_ref++;
          locked_seen = 1;
        end
      end
    end
    check(fs_seen == 4, $sformatf("four frame starts (%0d)", fs_seen));
    check(blank_lines == 3 * (VT - VA), $sformatf("blank lines timed (%0d)", blank_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
