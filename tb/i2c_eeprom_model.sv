// i2c_eeprom_model: behavioural serial EEPROM (24C02-style, 256 bytes) for
// simulation only. It answers 7-bit address ADDR, takes a one-byte word
// address, accepts page writes and sequential reads (address auto-increment),
// and releases the bus after a NACK or STOP. The first NACK_FIRST address bytes
// that match are not acknowledged (as a device busy with an internal write
// would do). With STRETCH > 0 it holds SCL low for STRETCH ns after each
// acknowledge slot (clock stretching). Counters report what happened.
`timescale 1ns/1ps
module i2c_eeprom_model #(
  parameter logic [6:0] ADDR       = 7'h50,
  parameter int         NACK_FIRST = 0,
  parameter int         STRETCH    = 0
) (
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe
);

  typedef enum {M_IDLE, M_ADDR, M_WADDR, M_WDATA, M_READ} mode_e;

  logic [7:0] mem [256];
  mode_e      mode = M_IDLE;
  int         phase = 0;
  logic [7:0] sh = '0, rbyte = '0, ptr = '0;
  logic       ack = 1'b0, rw = 1'b0, mack = 1'b1;
  int         nacks_left = NACK_FIRST;
  int         n_start = 0, n_stop = 0, n_nack = 0, n_stretch = 0, n_read = 0, n_write = 0;

  logic is_idle;
  assign is_idle = (mode == M_IDLE);

  initial begin
    scl_oe = 1'b0;
    sda_oe = 1'b0;
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
  end

  always @(negedge sda) if (scl) begin
    mode   = M_ADDR;
    phase  = -1;        // the SCL fall that ends START is not a bit
    sda_oe = 1'b0;
    n_start++;
  end

  always @(posedge sda) if (scl) begin
    mode   = M_IDLE;
    sda_oe = 1'b0;
    n_stop++;
  end

  always @(posedge scl) if (mode != M_IDLE) begin
    if (phase >= 0 && phase < 8 && mode != M_READ) sh = {sh[6:0], sda};
    if (phase == 8 && mode == M_READ) mack = sda;
  end

  always @(negedge scl) if (mode != M_IDLE) begin
    if (phase < 7) begin
      phase++;
      if (mode == M_READ) sda_oe = ~rbyte[7-phase];
    end else if (phase == 7) begin
      phase = 8;
      sda_oe = 1'b0;
      unique case (mode)
        M_ADDR: begin
          ack = (sh[7:1] == ADDR) && (nacks_left == 0);
          if (sh[7:1] == ADDR && nacks_left > 0) begin nacks_left--; n_nack++; end
          rw = sh[0];
          sda_oe = ack;
        end
        M_WADDR: begin ptr = sh; sda_oe = 1'b1; end
        M_WDATA: begin mem[ptr] = sh; ptr++; n_write++; sda_oe = 1'b1; end
        M_READ:  begin ptr++; n_read++; end
        default: ;
      endcase
    end else begin
      phase  = 0;
      sda_oe = 1'b0;
      unique case (mode)
        M_ADDR:  if (!ack) mode = M_IDLE;
                 else if (rw) begin mode = M_READ; rbyte = mem[ptr]; sda_oe = ~rbyte[7]; end
                 else mode = M_WADDR;
        M_WADDR: mode = M_WDATA;
        M_WDATA: ;
        M_READ:  if (!mack) begin rbyte = mem[ptr]; sda_oe = ~rbyte[7]; end
                 else mode = M_IDLE;
        default: ;
      endcase
      if (STRETCH > 0 && mode != M_IDLE) begin
        scl_oe = 1'b1;
        n_stretch++;
        #(STRETCH * 1ns);
        scl_oe = 1'b0;
      end
    end
  end

endmodule
