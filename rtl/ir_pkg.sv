// ir_pkg: types and constants shared by the infrared camera processing chain.
//
// Video moves through the chain as a pixel plus a sync_t pair of blanking
// flags (hblank, vblank), one pixel per clock; a pixel is active when neither
// flag is set. The 1024x18 coefficient RAM is shared by the 5x5 filter and the
// histogram equalizer: the 25 filter coefficients sit at FILT_BASE (row-major,
// row 1 = oldest line, column 1 = oldest pixel) and the equalization table at
// MAP_BASE. The address map and the serial-protocol byte codes are this
// design's own choices; the RAM size, coefficient format (sign bit, 4 integer
// bits, 13 fraction bits) and 12-bit equalizer input follow the thesis.
//
// Lint note: a module that imports this package but not every constant gets
// unused-parameter warnings for the others; they are harmless.
package ir_pkg;

  typedef struct packed {
    logic vblank;
    logic hblank;
  } sync_t;

  function automatic logic is_active(sync_t s);
    return !s.vblank && !s.hblank;
  endfunction

  // Shared coefficient RAM (dpram1kx18)
  localparam int COEF_AW   = 10;
  localparam int COEF_W    = 18;
  localparam int COEF_FRAC = 13;
  localparam int NTAPS     = 25;
  localparam int FILT_BASE = 0;
  localparam int MAP_BASE  = 32;
  localparam int MAP_DEPTH = 1024 - MAP_BASE;
  localparam logic [COEF_W-1:0] COEF_ONE = COEF_W'(1) << COEF_FRAC;

  // Histogram equalizer input width (12-bit levels, dpram4kx18)
  localparam int HE_BITS = 12;

  // RS232 command protocol
  localparam logic [7:0] START_BYTE = 8'hAA;
  typedef enum logic [7:0] {
    CMD_SET_FILTER = 8'h01,   // 25 coefficients, 3 bytes each, MSB first
    CMD_MOUSE_POS  = 8'h02,   // x[15:8], x[7:0], y[15:8], y[7:0]
    CMD_MEASURE    = 8'h03    // no parameters; measures at the mouse position
  } cmd_e;
  localparam logic [7:0] RPL_ACK  = 8'h06;
  localparam logic [7:0] RPL_NAK  = 8'h15;
  localparam logic [7:0] RPL_TEMP = 8'h83;
  localparam int FILTER_PARAM_BYTES = 3 * NTAPS;

endpackage
