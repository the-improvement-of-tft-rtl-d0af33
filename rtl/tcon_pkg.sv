// tcon_pkg: types and constants shared by the timing controller.
//
// The controller's panel timing is not fixed in hardware: it is read from an
// external serial EEPROM after reset and held in a tcon_cfg_t. The EEPROM
// layout (CFG_BYTES bytes from word address 0, 16-bit fields big-endian, then a
// mode byte) is this design's own choice; the idea of storing the panel timing
// in an EEPROM so one controller serves many panels is the core of the design.
// tcon_pos_t is the per-pixel position that the counter block hands to the
// driver-timing and dithering blocks.
package tcon_pkg;

  // Polarity inversion schemes of the panel (frame, line, column, pixel).
  typedef enum logic [1:0] {
    INV_FRAME  = 2'd0,
    INV_LINE   = 2'd1,
    INV_COLUMN = 2'd2,
    INV_PIXEL  = 2'd3
  } inv_mode_e;

  // Commands of the byte-level I2C master.
  typedef enum logic [1:0] {
    I2C_START = 2'd0,   // START, or repeated START when the bus is held
    I2C_STOP  = 2'd1,
    I2C_WRITE = 2'd2,   // 8 bits out, ACK in
    I2C_READ  = 2'd3    // 8 bits in, ACK/NACK out
  } i2c_cmd_e;

  // Timing loaded from the EEPROM. Horizontal positions are pixel clocks
  // counted from the rising edge of DE of the line.
  typedef struct packed {
    logic [15:0] h_active;  // pixels per line
    logic [15:0] v_active;  // lines per frame (= gate lines)
    logic [15:0] h_total;   // line period incl. blanking, in pixel clocks
    logic [15:0] tp_rise;   // TP leading edge
    logic [15:0] tp_fall;   // TP trailing edge
    logic [15:0] ckv_rise;  // CKV rising edge
    logic [15:0] ckv_fall;  // CKV falling edge (STV changes here)
    logic [15:0] oe_rise;   // OE (gate output disable) start
    logic [15:0] oe_fall;   // OE end
    inv_mode_e   inv_mode;
    logic        frc_en;    // FRC default from the EEPROM (ORed with pin)
  } tcon_cfg_t;

  localparam int CFG_WORDS = 9;
  localparam int CFG_BYTES = 2 * CFG_WORDS + 1;   // 19

  // Position of the pixel presented on the same cycle.
  typedef struct packed {
    logic        locked;      // a vertical blank has been seen: counts valid
    logic        de;          // pixel is active data
    logic        line_start;  // first cycle of a line (real or blank)
    logic        frame_start; // line_start of line 0
    logic [15:0] t;           // pixel clocks since line start (saturates)
    logic [15:0] h;           // pixel index within the line
    logic [15:0] v;           // line index within the frame
    logic [1:0]  frame;       // frame counter (FRC phase, POL parity)
  } tcon_pos_t;

  typedef struct packed {
    logic [7:0] r, g, b;
  } rgb8_t;

  typedef struct packed {
    logic [5:0] r, g, b;
  } rgb6_t;

  // Decode the EEPROM byte image (byte 0 in bits [8*CFG_BYTES-1 -: 8]).
  function automatic tcon_cfg_t cfg_from_bytes(input logic [8*CFG_BYTES-1:0] img);
    tcon_cfg_t c;
    c.h_active = img[8*CFG_BYTES-1  -: 16];
    c.v_active = img[8*CFG_BYTES-17 -: 16];
    c.h_total  = img[8*CFG_BYTES-33 -: 16];
    c.tp_rise  = img[8*CFG_BYTES-49 -: 16];
    c.tp_fall  = img[8*CFG_BYTES-65 -: 16];
    c.ckv_rise = img[8*CFG_BYTES-81 -: 16];
    c.ckv_fall = img[8*CFG_BYTES-97 -: 16];
    c.oe_rise  = img[8*CFG_BYTES-113 -: 16];
    c.oe_fall  = img[8*CFG_BYTES-129 -: 16];
    c.inv_mode = inv_mode_e'(img[1:0]);
    c.frc_en   = img[2];
    return c;
  endfunction

endpackage
