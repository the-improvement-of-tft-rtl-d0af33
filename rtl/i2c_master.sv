// i2c_master: byte-level I2C bus master on open-drain SCL/SDA.
//
// A command (START, STOP, WRITE, READ) is accepted when cmd_valid is high and
// busy is low; done pulses for one clock when it has finished. Every bit is cut
// into four quarter periods of QUARTER clocks: SDA is set while SCL is low,
// SCL is released, the line is sampled a quarter after SCL was seen high, and
// SCL is pulled low again. Data go MSB first; the ninth bit is the acknowledge
// (ack_recv after WRITE, ack_send driven after READ, 0 = ACK). START and STOP
// move SDA while SCL is high; a START issued while the master holds the bus is
// a repeated START.
//
// The high phase of SCL is timed from the moment SCL is actually seen high, so
// a slave that stretches the clock by holding SCL low is waited for. When the
// master leaves SDA high on a data bit but reads it low, another master has won
// the bus: arb_lost is raised with done, both lines are released and the
// command ends. The bus protocol follows the I2C rules; the quarter-period
// sequencer, the timing split and the command interface are this design's own.
//
// Pins: scl_oe/sda_oe = 1 pulls the line low; scl_i/sda_i are the line levels.
// QUARTER = 270 gives 100 kHz SCL from a 108 MHz clock.
module i2c_master
  import tcon_pkg::*;
#(
  parameter int QUARTER = 270
) (
  input  logic       clk,
  input  logic       rst_n,
  input  i2c_cmd_e   cmd,
  input  logic       cmd_valid,
  input  logic [7:0] wdata,
  input  logic       ack_send,
  output logic [7:0] rdata,
  output logic       ack_recv,
  output logic       done,
  output logic       busy,
  output logic       arb_lost,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);

  localparam int QW = (QUARTER > 1) ? $clog2(QUARTER + 1) : 1;

  typedef enum logic [2:0] {S_IDLE, S_START, S_STOP, S_BIT} state_e;

  state_e         state;
  i2c_cmd_e       op;
  logic [1:0]     phase;
  logic [QW-1:0]  timer;
  logic [3:0]     bitn;       // 0..8, bit 8 is the acknowledge
  logic [8:0]     shreg;      // bits to drive (1 = release)
  logic [8:0]     rxreg;
  logic           hold;       // master owns the bus (SCL held low)

  wire  tick = (timer == QW'(QUARTER - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op       <= I2C_START;
      phase    <= '0;
      timer    <= '0;
      bitn     <= '0;
      shreg    <= '1;
      rxreg    <= '0;
      hold     <= 1'b0;
      scl_oe   <= 1'b0;
      sda_oe   <= 1'b0;
      done     <= 1'b0;
      arb_lost <= 1'b0;
      rdata    <= '0;
      ack_recv <= 1'b1;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          timer <= '0;
          phase <= '0;
          if (cmd_valid) begin
            op       <= cmd;
            arb_lost <= 1'b0;
            bitn     <= '0;
            unique case (cmd)
              I2C_START: state <= S_START;
              I2C_STOP:  if (hold) state <= S_STOP;
                         else      done  <= 1'b1;    // bus not held

              I2C_WRITE: begin state <= S_BIT; shreg <= {wdata, 1'b1}; end
              I2C_READ:  begin state <= S_BIT; shreg <= {8'hFF, ack_send}; end
            endcase
          end
        end

        // START: release SDA, release SCL, pull SDA, pull SCL
        S_START: begin
          unique case (phase)
            2'd0: sda_oe <= 1'b0;
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b1;
            2'd3: scl_oe <= 1'b1;
          endcase
          if (phase == 2'd1 && !scl_i) timer <= '0;      // stretched
          else if (!tick) timer <= timer + 1'b1;
          else begin
            timer <= '0;
            phase <= phase + 1'b1;
            if (phase == 2'd3) begin
              state <= S_IDLE;
              hold  <= 1'b1;
              done  <= 1'b1;
            end
          end
        end

        // STOP: pull SDA (SCL low), release SCL, release SDA
        S_STOP: begin
          unique case (phase)
            2'd0: sda_oe <= 1'b1;
            2'd1: scl_oe <= 1'b0;
            default: sda_oe <= 1'b0;
          endcase
          if (phase == 2'd1 && !scl_i) timer <= '0;
          else if (!tick) timer <= timer + 1'b1;
          else begin
            timer <= '0;
            phase <= phase + 1'b1;
            if (phase == 2'd2) begin
              state <= S_IDLE;
              hold  <= 1'b0;
              done  <= 1'b1;
            end
          end
        end

        // one bit: set SDA, release SCL, sample, pull SCL
        S_BIT: begin
          unique case (phase)
            2'd0: begin scl_oe <= 1'b1; sda_oe <= ~shreg[8]; end
            2'd1: scl_oe <= 1'b0;
            2'd2: ;
            2'd3: scl_oe <= 1'b1;
          endcase
          if (phase == 2'd1 && !scl_i) timer <= '0;
          else if (!tick) timer <= timer + 1'b1;
          else begin
            timer <= '0;
            phase <= phase + 1'b1;
            if (phase == 2'd1) begin
              rxreg <= {rxreg[7:0], sda_i};
              if (op == I2C_WRITE && bitn != 4'd8 && shreg[8] && !sda_i) begin
                // lost arbitration: withdraw from the bus
                arb_lost <= 1'b1;
                scl_oe   <= 1'b0;
                sda_oe   <= 1'b0;
                hold     <= 1'b0;
                state    <= S_IDLE;
                done     <= 1'b1;
              end
            end
            if (phase == 2'd3) begin
              shreg <= {shreg[7:0], 1'b1};
              bitn  <= bitn + 1'b1;
              if (bitn == 4'd8) begin
                state    <= S_IDLE;
                done     <= 1'b1;
                rdata    <= rxreg[8:1];
                ack_recv <= rxreg[0];
                sda_oe   <= 1'b0;
              end
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a command may only be issued while the master is idle
  assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> !busy);

endmodule
