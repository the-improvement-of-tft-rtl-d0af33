// rsds_tx_map_tb: random pixels through the 8-bit and the 6-bit mapping. The
// expected pair bits come from a table of the 8-bit mapping (pair, first
// half, second half) and, for 6 bits, from the same rule with three pairs per
// colour.
`timescale 1ns/1ps
module rsds_tx_map_tb;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] r8 = 0, g8 = 0, b8 = 0;
  logic [11:0] rise8, fall8;
  logic [8:0]  rise6, fall6;

  rsds_tx_map #(.BITS(8)) dut8 (.clk, .rst_n, .r(r8), .g(g8), .b(b8), .rise(rise8), .fall(fall8));
  rsds_tx_map #(.BITS(6)) dut6 (.clk, .rst_n, .r(r8[5:0]), .g(g8[5:0]), .b(b8[5:0]),
                                .rise(rise6), .fall(fall6));

  // 8-bit mapping: {colour (0=R,1=G,2=B), first-half bit, second-half bit} per pair
  int map8 [12][3] = '{
    '{0, 0, 1}, '{0, 2, 3}, '{0, 4, 5}, '{0, 6, 7},
    '{1, 0, 1}, '{1, 2, 3}, '{1, 4, 5}, '{1, 6, 7},
    '{2, 0, 1}, '{2, 2, 3}, '{2, 4, 5}, '{2, 6, 7}
  };

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic pick(input int c, input int i, input logic [7:0] r, g, b);
    return (c == 0) ? r[i] : (c == 1) ? g[i] : b[i];
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      r8 = 8'($urandom); g8 = 8'($urandom); b8 = 8'($urandom);
      @(negedge clk);
      for (int p = 0; p < 12; p++) begin
        check(rise8[p] == pick(map8[p][0], map8[p][1], r8, g8, b8), $sformatf("8-bit pair %0d first", p));
        check(fall8[p] == pick(map8[p][0], map8[p][2], r8, g8, b8), $sformatf("8-bit pair %0d second", p));
      end
      for (int c = 0; c < 3; c++)
        for (int k = 0; k < 3; k++) begin
          check(rise6[3*c+k] == pick(c, 2*k, r8, g8, b8), "6-bit first");
          check(fall6[3*c+k] == pick(c, 2*k+1, r8, g8, b8), "6-bit second");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
