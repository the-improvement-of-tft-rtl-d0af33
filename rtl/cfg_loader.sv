// cfg_loader: reads the panel timing from an external serial EEPROM after reset.
//
// The loader drives an i2c_master through a random-address sequential read:
// START, device address + write, word address 0, repeated START, device
// address + read, CFG_BYTES data bytes (ACK after each but the last, NACK after
// the last), STOP. The bytes are shifted into an image that tcon_pkg's
// cfg_from_bytes() decodes into the timing structure; cfg_done then stays high
// until reset and the rest of the controller starts working. If the EEPROM does
// not acknowledge (absent, or busy with an internal write) the loader sends
// STOP, waits 8 quarter periods and starts over, counting the attempt in
// retries; after lost arbitration it skips the STOP and only waits, as the bus is
// the other master's. That loading timing values from an EEPROM over I2C makes the
// controller reusable across panels follows the design; the byte layout, the
// 7-bit address 1010_000 and the retry policy are this design's own choices.
//
// Timing: one byte takes 36 quarter periods of QUARTER clocks; a full load of
// 19 bytes at 100 kHz takes about 0.24 ms.
module cfg_loader
  import tcon_pkg::*;
#(
  parameter int         QUARTER  = 270,
  parameter logic [6:0] DEV_ADDR = 7'h50
) (
  input  logic      clk,
  input  logic      rst_n,
  output tcon_cfg_t cfg,
  output logic      cfg_done,
  output logic [7:0] retries,
  output logic      scl_oe,
  output logic      sda_oe,
  input  logic      scl_i,
  input  logic      sda_i
);

  typedef enum logic [3:0] {
    L_START, L_DEVW, L_WADDR, L_RSTART, L_DEVR, L_READ, L_STOP, L_ABORT, L_WAIT, L_DONE
  } lstate_e;

  lstate_e    st;
  logic       issued;           // command of this state sent, waiting for done
  logic [4:0] nbyte;
  logic [8*CFG_BYTES-1:0] img;
  logic [$clog2(8*QUARTER+1)-1:0] wait_cnt;

  i2c_cmd_e   cmd;
  logic       cmd_valid;
  logic [7:0] wdata;
  logic       ack_send;
  logic [7:0] rdata;
  logic       ack_recv, done, busy, arb_lost;

  i2c_master #(.QUARTER(QUARTER)) u_i2c (
    .clk, .rst_n, .cmd, .cmd_valid, .wdata, .ack_send, .rdata, .ack_recv,
    .done, .busy, .arb_lost, .scl_oe, .sda_oe, .scl_i, .sda_i
  );

  always_comb begin
    cmd       = I2C_START;
    wdata     = 8'h00;
    ack_send  = 1'b0;
    unique case (st)
      L_START, L_RSTART: cmd = I2C_START;
      L_DEVW:  begin cmd = I2C_WRITE; wdata = {DEV_ADDR, 1'b0}; end
      L_WADDR: begin cmd = I2C_WRITE; wdata = 8'h00; end
      L_DEVR:  begin cmd = I2C_WRITE; wdata = {DEV_ADDR, 1'b1}; end
      L_READ:  begin cmd = I2C_READ;  ack_send = (nbyte == 5'(CFG_BYTES - 1)); end
      L_STOP, L_ABORT: cmd = I2C_STOP;
      default: ;
    endcase
    cmd_valid = !issued && !busy && !done &&
                !(st inside {L_WAIT, L_DONE});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= L_START;
      issued   <= 1'b0;
      nbyte    <= '0;
      img      <= '0;
      wait_cnt <= '0;
      cfg      <= '0;
      cfg_done <= 1'b0;
      retries  <= '0;
    end else begin
      if (cmd_valid) issued <= 1'b1;
      if (done) begin
        issued <= 1'b0;
        if (arb_lost) begin
          st       <= L_WAIT;
          wait_cnt <= '0;
          retries  <= retries + 1'b1;
        end else begin
          unique case (st)
            L_START:  st <= L_DEVW;
            L_DEVW:   st <= ack_recv ? L_ABORT : L_WADDR;
            L_WADDR:  st <= ack_recv ? L_ABORT : L_RSTART;
            L_RSTART: st <= L_DEVR;
            L_DEVR:   st <= ack_recv ? L_ABORT : L_READ;
            L_READ: begin
              img   <= {img[8*CFG_BYTES-9:0], rdata};
              nbyte <= nbyte + 1'b1;
              if (nbyte == 5'(CFG_BYTES - 1)) st <= L_STOP;
            end
            L_STOP: begin
              st       <= L_DONE;
              cfg      <= cfg_from_bytes(img);
              cfg_done <= 1'b1;
            end
            L_ABORT: begin
              st       <= L_WAIT;
              wait_cnt <= '0;
              retries  <= retries + 1'b1;
            end
            default: ;
          endcase
        end
      end
      if (st == L_WAIT) begin
        wait_cnt <= wait_cnt + 1'b1;
        if (wait_cnt == $bits(wait_cnt)'(8 * QUARTER)) begin
          st    <= L_START;
          nbyte <= '0;
        end
      end
    end
  end

endmodule
