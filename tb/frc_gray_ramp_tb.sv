// frc_gray_ramp_tb: the grey-ramp experiment in simulation. A 256 x 4 image
// whose column x has grey level x is shown for four frames through the frame
// rate control, as on a panel with 6-bit drivers. For every column the light
// the eye integrates (mean of the 4 lines x 4 frames, in 8-bit units) is
// computed. With FRC on, columns 0..252 must give their own level exactly
// (253 distinct levels) and 253..255 the level 252; with FRC off only 64
// distinct levels remain, each column showing its level rounded down to a
// multiple of 4.
`timescale 1ns/1ps
module frc_gray_ramp_tb;
  import tcon_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 1, x0 = 0, y0 = 0;
  logic [1:0] frame = 0;
  rgb8_t rgb_in = '0;
  rgb6_t rgb_out;

  frc_dither dut (.clk, .rst_n, .en, .x0, .y0, .frame, .rgb_in, .rgb_out);

  int checks = 0, failures = 0;
  int acc [256];
  bit seen [256];
  int distinct;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic show(input bit on);
    for (int x = 0; x < 256; x++) acc[x] = 0;
    for (int f = 0; f < 4; f++)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 256; x++) begin
          @(negedge clk);
          en = on; frame = 2'(f); y0 = y[0]; x0 = x[0];
          rgb_in = '{r: 8'(x), g: 8'(x), b: 8'(x)};
          @(negedge clk);
          acc[x] += 4 * int'(rgb_out.g);
        end
    for (int v = 0; v < 256; v++) seen[v] = 0;
    distinct = 0;
    for (int x = 0; x < 256; x++) begin
      int lvl;
      check(acc[x] % 16 == 0, $sformatf("column %0d averages to a whole level", x));
      lvl = acc[x] / 16;
      if (on) check(lvl == ((x <= 252) ? x : 252), $sformatf("FRC on: column %0d shows %0d", x, lvl));
      else    check(lvl == (x / 4) * 4, $sformatf("FRC off: column %0d shows %0d", x, lvl));
      if (!seen[lvl]) distinct++;
      seen[lvl] = 1;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    show(1'b1);
    check(distinct == 253, $sformatf("FRC on: %0d distinct levels", distinct));
    show(1'b0);
    check(distinct == 64, $sformatf("FRC off: %0d distinct levels", distinct));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
