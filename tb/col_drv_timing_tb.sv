// col_drv_timing_tb: drives positions of a known raster straight into the
// block and checks STH (first pixel of each data line), the TP window and
// POL for all four inversion schemes. A small column-driver model turns POL
// into the polarity of each dot (neighbouring columns alternate inside the
// driver for column and pixel inversion) and the testbench checks the
// resulting 4x4 patterns: frame inversion all equal, line inversion alternate
// rows, column inversion alternate columns, pixel inversion a checkerboard,
// and every dot reversed in the next frame.
`timescale 1ns/1ps
module col_drv_timing_tb;
  import tcon_pkg::*;

  localparam int HA = 8, HT = 20, VA = 6, VT = 9;
  localparam int TPR = 10, TPF = 13;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tcon_cfg_t cfg;
  tcon_pos_t pos;
  logic sth, tp, pol;

  col_drv_timing dut (.clk, .rst_n, .pos, .cfg, .sth, .tp, .pol);

  int checks = 0, failures = 0;
  int n_sth = 0, n_tp = 0;
  bit polmap [2][4];     // POL latched at the TP of rows 0..3, two frames
  bit exp_pol;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit dot(input inv_mode_e m, input bit p, input int col);
    return p ^ ((m == INV_COLUMN || m == INV_PIXEL) ? col[0] : 1'b0);
  endfunction

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
    cfg.tp_rise  = 16'(TPR);
    cfg.tp_fall  = 16'(TPF);
    pos = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      cfg.inv_mode = inv_mode_e'(m);
      for (int f = 0; f < 2; f++) begin
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
            check(sth == (x == 0 && y < VA), $sformatf("sth m%0d f%0d y%0d x%0d", m, f, y, x));
            check(tp == (y < VA && x >= TPR && x < TPF), $sformatf("tp m%0d y%0d x%0d", m, y, x));
            n_sth += sth;
            if (tp && x == TPR) n_tp++;
            if (y < VA && x >= TPR) begin
              exp_pol = f[0] ^ ((m == INV_LINE || m == INV_PIXEL) ? y[0] : 1'b0);
              check(pol == exp_pol, $sformatf("pol m%0d f%0d y%0d", m, f, y));
              if (x == TPR && y < 4) polmap[f][y] = pol;
            end
          end
        end
      end
      // dot polarity patterns of this scheme
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          bit d0, d1;
          d0 = dot(inv_mode_e'(m), polmap[0][r], c);
          d1 = dot(inv_mode_e'(m), polmap[1][r], c);
          check(d1 != d0, $sformatf("m%0d dot %0d,%0d reversed next frame", m, r, c));
          unique case (m)
            INV_FRAME:  check(d0 == dot(inv_mode_e'(m), polmap[0][0], 0), "frame inversion uniform");
            INV_LINE:   check(d0 == (dot(inv_mode_e'(m), polmap[0][0], 0) ^ r[0]), "line inversion rows");
            INV_COLUMN: check(d0 == (dot(inv_mode_e'(m), polmap[0][0], 0) ^ c[0]), "column inversion cols");
            INV_PIXEL:  check(d0 == (dot(inv_mode_e'(m), polmap[0][0], 0) ^ r[0] ^ c[0]), "pixel checkerboard");
          endcase
        end
    end
    check(n_sth == 8 * VA, $sformatf("STH count %0d", n_sth));
    check(n_tp == 8 * VA, $sformatf("TP count %0d", n_tp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
