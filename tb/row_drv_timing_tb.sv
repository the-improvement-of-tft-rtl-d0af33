// row_drv_timing_tb: drives positions of a known raster into the block and
// checks the STV, CKV and OE waveforms against their programmed edges. A
// behavioural gate driver (shift register clocked by CKV, outputs blanked by
// OE) then checks the scan: never two gate lines on at once, gate lines 1..VA
// switched on one after another, each once per frame, gate k during line k
// (until OE blanks it at the start of line k+1), all off in vertical blanking.
`timescale 1ns/1ps
module row_drv_timing_tb;
  import tcon_pkg::*;

  localparam int HA = 8, HT = 20, VA = 6, VT = 9;
  localparam int CKR = 3, CKF = 12, OER = 1, OEF = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tcon_cfg_t cfg;
  tcon_pos_t pos;
  logic stv, ckv, oe;
  int   n_on, cur_gate;

  row_drv_timing dut (.clk, .rst_n, .pos, .cfg, .stv, .ckv, .oe);
  row_driver_model #(.N(VA)) gd (.stv, .ckv, .oe, .n_on, .cur_gate);

  int checks = 0, failures = 0;
  int n_ckv = 0, n_stv = 0, last_gate, gates_on, max_on = 0;
  logic ckv_d = 0, stv_d = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
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
    cfg.ckv_rise = 16'(CKR);
    cfg.ckv_fall = 16'(CKF);
    cfg.oe_rise  = 16'(OER);
    cfg.oe_fall  = 16'(OEF);
    pos = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      last_gate = 0;
      gates_on  = 0;
      for (int y = 0; y < VT; y++) begin
        for (int x = 0; x < HT; x++) begin
          pos.locked      = 1'b1;
          pos.de          = (x < HA) && (y < VA);
          pos.line_start  = (x == 0);
          pos.frame_start = (x == 0) && (y == 0);
          pos.t = 16'(x);
          pos.h = 16'((x < HA) ? x : HA - 1);
          pos.v = 16'(y);
          pos.frame = 2'(f);
          @(negedge clk);
          check(ckv == (y >= 1 && x >= CKR && x < CKF), $sformatf("ckv y%0d x%0d", y, x));
          check(oe  == (y >= 1 && x >= OER && x < OEF), $sformatf("oe y%0d x%0d", y, x));
          check(stv == ((y == 0 && x >= CKF) || (y == 1 && x < CKF)), $sformatf("stv y%0d x%0d", y, x));
          if (stv != stv_d) check(ckv == 0 && (stv || ckv_d), "STV rises while CKV is low and falls with CKV");
          if (ckv && !ckv_d) begin
            n_ckv++;
            check(oe, "OE covers the CKV rising edge");
          end
          if (stv && !stv_d) n_stv++;
          ckv_d = ckv;
          stv_d = stv;
          if (n_on > max_on) max_on = n_on;
          if (n_on == 1) begin
            check(cur_gate == y || (cur_gate == y - 1 && x < OER), $sformatf("gate %0d on in line %0d", cur_gate, y));
            if (cur_gate != last_gate) begin
              check(cur_gate == last_gate + 1, "gates in order");
              last_gate = cur_gate;
              gates_on++;
            end
          end
        end
      end
      check(gates_on == VA, $sformatf("frame %0d: %0d gates scanned", f, gates_on));
    end
    check(max_on == 1, "never two gates on together");
    check(n_ckv == 3 * (VT - 1), $sformatf("CKV pulses %0d", n_ckv));
    check(n_stv == 3, "one STV per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
