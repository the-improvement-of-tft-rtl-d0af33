// frc_dither_tb: exhaustive check of the frame rate control. For every 8-bit
// input, every 2x2 position and every frame phase the output must be the
// upper six bits or one more; for inputs up to 252 the four frames of each
// pixel and the four pixels of each frame must both add up to the input (the
// displayed level averages to in/4); above 252 the output stays at 63; with
// FRC off the output is the truncated value. It also checks the worked
// example: input 130 shows 128,128,132,132 on the upper-left pixel over four
// frames and a 128/132 checkerboard within a frame.
`timescale 1ns/1ps
module frc_dither_tb;
  import tcon_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, x0 = 0, y0 = 0;
  logic [1:0] frame = 0;
  rgb8_t rgb_in = '0;
  rgb6_t rgb_out;

  frc_dither dut (.clk, .rst_n, .en, .x0, .y0, .frame, .rgb_in, .rgb_out);

  int checks = 0, failures = 0;
  int outv [4][4];      // [frame][position]
  int n_inc = 0, n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic apply(input int v, input int p, input int f, input bit e);
    @(negedge clk);
    en = e; y0 = p[1]; x0 = p[0]; frame = 2'(f);
    rgb_in.r = 8'(v); rgb_in.g = 8'(255 - v); rgb_in.b = 8'(v);
    @(negedge clk);
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      for (int f = 0; f < 4; f++)
        for (int p = 0; p < 4; p++) begin
          apply(v, p, f, 1'b1);
          outv[f][p] = int'(rgb_out.r);
          check(rgb_out.b == rgb_out.r, "same rank for all colours");
          check(int'(rgb_out.g) == ((255 - v <= 252) ? -1 : 63) ||
                int'(rgb_out.g) inside {[(255 - v) / 4 : (255 - v) / 4 + 1]}, "green in range");
          check(outv[f][p] == v / 4 || (outv[f][p] == v / 4 + 1 && v <= 251),
                $sformatf("v=%0d out=%0d", v, outv[f][p]));
          if (outv[f][p] != v / 4) n_inc++;
        end
      if (v <= 252) begin
        for (int p = 0; p < 4; p++)
          check(outv[0][p] + outv[1][p] + outv[2][p] + outv[3][p] == v,
                $sformatf("temporal sum v=%0d p=%0d", v, p));
        for (int f = 0; f < 4; f++)
          check(outv[f][0] + outv[f][1] + outv[f][2] + outv[f][3] == v,
                $sformatf("spatial sum v=%0d f=%0d", v, f));
      end else begin
        for (int f = 0; f < 4; f++)
          for (int p = 0; p < 4; p++) begin
            check(outv[f][p] == 63, "saturates at 63");
            n_sat++;
          end
      end
      apply(v, v % 4, v % 4, 1'b0);
      check(int'(rgb_out.r) == v / 4, "FRC off truncates");
    end
    // worked example, input 130
    for (int f = 0; f < 4; f++)
      for (int p = 0; p < 4; p++) begin
        apply(130, p, f, 1'b1);
        outv[f][p] = 4 * int'(rgb_out.r);
      end
    check(outv[0][0] == 128 && outv[1][0] == 128 && outv[2][0] == 132 && outv[3][0] == 132,
          "upper-left pixel 128,128,132,132");
    for (int f = 0; f < 4; f++)
      check(outv[f][0] == outv[f][3] && outv[f][1] == outv[f][2] && outv[f][0] != outv[f][1],
            "checkerboard");
    check(n_inc > 0 && n_sat > 0, "dither and saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
