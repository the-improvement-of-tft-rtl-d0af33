// i2c_master_tb: self-checking test of the byte-level I2C master against a
// behavioural EEPROM on a wired-AND bus. Covers a byte write, a random read
// with repeated START, ACK and NACK from the master, a NACK from an absent
// device, the length of one byte (9 bits of 4 quarter periods; the SCL-high
// quarter lasts one clock more because the master waits to see SCL high),
// clock stretching (cycle counts include the clock that accepts the command), and loss of arbitration to a second master.
`timescale 1ns/1ps
module i2c_master_tb;
  import tcon_pkg::*;

  localparam int Q = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  i2c_cmd_e   cmd = I2C_START;
  logic       cmd_valid = 0, ack_send = 0;
  logic [7:0] wdata = 0, rdata;
  logic       ack_recv, done, busy, arb_lost;
  logic       m_scl_oe, m_sda_oe, e_scl_oe, e_sda_oe, s_scl_oe, s_sda_oe;
  logic       other_sda_oe = 0;
  logic       scl, sda;

  assign scl = ~(m_scl_oe | e_scl_oe | s_scl_oe);
  assign sda = ~(m_sda_oe | e_sda_oe | s_sda_oe | other_sda_oe);

  i2c_master #(.QUARTER(Q)) dut (
    .clk, .rst_n, .cmd, .cmd_valid, .wdata, .ack_send, .rdata, .ack_recv,
    .done, .busy, .arb_lost, .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .scl_i(scl), .sda_i(sda)
  );

  // plain EEPROM at 0x50, and a stretching one at 0x51
  i2c_eeprom_model #(.ADDR(7'h50)) eep (.scl, .sda, .scl_oe(e_scl_oe), .sda_oe(e_sda_oe));
  i2c_eeprom_model #(.ADDR(7'h51), .STRETCH(300)) eeps (.scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe));

  int checks = 0, failures = 0;
  int cycles, nstop, nstart;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_cmd(input i2c_cmd_e c, input logic [7:0] d = 8'h00, input logic a = 1'b0);
    @(negedge clk);
    cmd = c; wdata = d; ack_send = a; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    eep.mem[6] = 8'h9A;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(scl && sda, "bus idle after reset");

    // byte write 0x3C to word 5
    nstart = eep.n_start;
    do_cmd(I2C_START);
    check(eep.n_start == nstart + 1, "START seen by slave");
    do_cmd(I2C_WRITE, 8'hA0);
    check(ack_recv == 0, "device address acknowledged");
    check(cycles == 36*Q + 10, $sformatf("byte time %0d", cycles));
    do_cmd(I2C_WRITE, 8'h05);
    check(ack_recv == 0, "word address acknowledged");
    do_cmd(I2C_WRITE, 8'h3C);
    check(ack_recv == 0, "data acknowledged");
    nstop = eep.n_stop;
    do_cmd(I2C_STOP);
    check(eep.n_stop == nstop + 1, "STOP seen by slave");
    check(eep.mem[5] == 8'h3C, "byte written");
    check(scl && sda, "bus released after STOP");

    // random read of words 5 and 6 with repeated START
    do_cmd(I2C_START);
    do_cmd(I2C_WRITE, 8'hA0);
    do_cmd(I2C_WRITE, 8'h05);
    do_cmd(I2C_START);
    check(eep.n_start == nstart + 3, "repeated START seen");
    do_cmd(I2C_WRITE, 8'hA1);
    check(ack_recv == 0, "read address acknowledged");
    do_cmd(I2C_READ, 8'h00, 1'b0);
    check(rdata == 8'h3C, $sformatf("read byte 0 = %h", rdata));
    do_cmd(I2C_READ, 8'h00, 1'b1);
    check(rdata == 8'h9A, $sformatf("read byte 1 = %h", rdata));
    check(eep.is_idle, "slave released after NACK");
    do_cmd(I2C_STOP);

    // absent device
    do_cmd(I2C_START);
    do_cmd(I2C_WRITE, 8'hAE);
    check(ack_recv == 1, "absent device not acknowledged");
    do_cmd(I2C_STOP);

    // stretching device
    eeps.mem[0] = 8'h5A;
    do_cmd(I2C_START);
    do_cmd(I2C_WRITE, 8'hA2);
    check(ack_recv == 0, "stretching device acknowledged");
    do_cmd(I2C_WRITE, 8'h00);
    check(cycles > 36*Q + 10 + 10, $sformatf("stretched byte took %0d", cycles));
    do_cmd(I2C_START);
    do_cmd(I2C_WRITE, 8'hA3);
    do_cmd(I2C_READ, 8'h00, 1'b1);
    check(rdata == 8'h5A, "read through stretching");
    check(eeps.n_stretch >= 3, "clock was stretched");
    do_cmd(I2C_STOP);

    // arbitration: another master holds SDA low while we send a 1
    do_cmd(I2C_START);
    @(negedge clk);
    other_sda_oe = 1;
    do_cmd(I2C_WRITE, 8'hA0);
    check(arb_lost == 1, "arbitration loss detected");
    check(m_scl_oe == 0 && m_sda_oe == 0, "lines released after losing");
    @(negedge clk);
    other_sda_oe = 0;
    repeat (4*Q) @(negedge clk);
    check(scl && sda, "bus idle again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
