// cfg_loader_tb: the loader reads a timing image from a behavioural EEPROM that
// refuses the first address byte (busy) and stretches the clock. Checks that
// the load is retried once, that every decoded field equals the value that was
// written, that cfg_done comes up once, and that the bus is left idle. A
// second load after reset loses arbitration to another master on its first
// address bit and must succeed on the retry.
`timescale 1ns/1ps
module cfg_loader_tb;
  import tcon_pkg::*;

  localparam int Q = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tcon_cfg_t  cfg;
  logic       cfg_done;
  logic [7:0] retries;
  logic       m_scl_oe, m_sda_oe, e_scl_oe, e_sda_oe, scl, sda;

  assign scl = ~(m_scl_oe | e_scl_oe);
  logic other_sda_oe = 0;              // a second master on the bus
  assign sda = ~(m_sda_oe | e_sda_oe | other_sda_oe);

  cfg_loader #(.QUARTER(Q)) dut (
    .clk, .rst_n, .cfg, .cfg_done, .retries,
    .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .scl_i(scl), .sda_i(sda)
  );

  i2c_eeprom_model #(.ADDR(7'h50), .NACK_FIRST(1), .STRETCH(200)) eep (
    .scl, .sda, .scl_oe(e_scl_oe), .sda_oe(e_sda_oe)
  );

  int checks = 0, failures = 0;
  localparam int WORDS [9] = '{1280, 1024, 1688, 1300, 1320, 1310, 1500, 1290, 1340};
  int done_rises = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge cfg_done) done_rises++;

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) begin
      eep.mem[2*i]   = 8'(WORDS[i] >> 8);
      eep.mem[2*i+1] = 8'(WORDS[i]);
    end
    eep.mem[18] = 8'b0000_0101;          // FRC on, line inversion
    eep.mem[19] = 8'hEE;                 // beyond the image: must not matter
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cfg_done == 0, "not done right after reset");
    wait (cfg_done);
    repeat (10) @(negedge clk);
    check(retries == 1, $sformatf("one retry after the NACK (%0d)", retries));
    check(eep.n_nack == 1, "slave refused once");
    check(eep.n_read == CFG_BYTES + 0, $sformatf("bytes read %0d", eep.n_read));
    check(eep.n_stretch > 0, "clock stretched");
    check(cfg.h_active == 16'(WORDS[0]), "h_active");
    check(cfg.v_active == 16'(WORDS[1]), "v_active");
    check(cfg.h_total  == 16'(WORDS[2]), "h_total");
    check(cfg.tp_rise  == 16'(WORDS[3]), "tp_rise");
    check(cfg.tp_fall  == 16'(WORDS[4]), "tp_fall");
    check(cfg.ckv_rise == 16'(WORDS[5]), "ckv_rise");
    check(cfg.ckv_fall == 16'(WORDS[6]), "ckv_fall");
    check(cfg.oe_rise  == 16'(WORDS[7]), "oe_rise");
    check(cfg.oe_fall  == 16'(WORDS[8]), "oe_fall");
    check(cfg.inv_mode == INV_LINE, "inversion mode");
    check(cfg.frc_en == 1'b1, "FRC bit");
    check(scl && sda, "bus idle after load");
    check(eep.is_idle, "slave idle after STOP");
    repeat (2000) @(negedge clk);
    check(done_rises == 1 && cfg_done, "cfg_done rose once and stays");

    // second load: another master pulls SDA low during the first address
    // bit (a 1), so the loader loses arbitration, waits and loads again
    eep.mem[18] = 8'b0000_0010;          // FRC off, column inversion
    @(negedge clk);
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge sda iff scl);              // START after reset
    @(negedge scl);                      // START finished
    other_sda_oe = 1;
    @(posedge scl);                      // contested bit is sampled
    repeat (4 * Q) @(negedge clk);       // loser has withdrawn by now
    check(!m_sda_oe && !m_scl_oe, "loader let go of the bus");
    other_sda_oe = 0;                    // other master's STOP
    wait (cfg_done);
    repeat (10) @(negedge clk);
    check(retries == 1, $sformatf("one retry after lost arbitration (%0d)", retries));
    check(cfg.inv_mode == INV_COLUMN && cfg.frc_en == 1'b0, "mode byte after second load");
    check(cfg.h_total == 16'(WORDS[2]) && cfg.oe_fall == 16'(WORDS[8]), "fields after second load");
    check(scl && sda, "bus idle after second load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
