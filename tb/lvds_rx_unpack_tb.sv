// lvds_rx_unpack_tb: random pixels are packed into lane words slot by slot
// from a table of the LVDS bit order (first slot of each lane first), both in
// the 8-bit four-lane and the 6-bit three-lane format, and the decoded RGB,
// DE, VS and HS are compared with the packed values.
`timescale 1ns/1ps
module lvds_rx_unpack_tb;
  import tcon_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0][6:0] rx = '0;
  logic mode8 = 1;
  rgb8_t rgb;
  logic de, vs, hs;

  lvds_rx_unpack dut (.clk, .rst_n, .rx, .mode8, .rgb, .de, .vs, .hs);

  // slot names, first slot of the cycle first
  string lane_slots [4][7] = '{
    '{"G0", "R5", "R4", "R3", "R2", "R1", "R0"},
    '{"B1", "B0", "G5", "G4", "G3", "G2", "G1"},
    '{"DE", "VS", "HS", "B5", "B4", "B3", "B2"},
    '{"--", "B7", "B6", "G7", "G6", "R7", "R6"}
  };

  int checks = 0, failures = 0, n6 = 0, n8 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic slot_bit(input string s, input logic [7:0] r, input logic [7:0] g,
                                    input logic [7:0] b, input logic d, input logic v,
                                    input logic h);
    int i;
    if (s == "DE") return d;
    if (s == "VS") return v;
    if (s == "HS") return h;
    if (s == "--") return 1'b0;
    i = s.getc(1) - "0";
    case (s.getc(0))
      "R": return r[i];
      "G": return g[i];
      default: return b[i];
    endcase
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r, g, b;
    logic d, v, h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      mode8 = (n % 3 != 0);
      r = 8'($urandom); g = 8'($urandom); b = 8'($urandom);
      d = 1'($urandom); v = 1'($urandom); h = 1'($urandom);
      for (int l = 0; l < 4; l++)
        for (int s = 0; s < 7; s++)
          rx[l][6-s] = (l == 3 && !mode8) ? 1'($urandom) : slot_bit(lane_slots[l][s], r, g, b, d, v, h);
      @(negedge clk);
      check(de == d && vs == v && hs == h, "DE/VS/HS");
      if (mode8) begin
        check(rgb.r == r && rgb.g == g && rgb.b == b, $sformatf("8-bit %h%h%h got %h", r, g, b, rgb));
        n8++;
      end else begin
        check(rgb.r == {r[5:0], 2'b00} && rgb.g == {g[5:0], 2'b00} && rgb.b == {b[5:0], 2'b00},
              "6-bit format");
        n6++;
      end
    end
    check(n6 > 0 && n8 > 0, "both formats used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
