// sav_pkg: types and constants shared by the self-adaptive vision architecture.
//
// The stream header is one 32-bit word sent right after each frame sync. Its
// fields, from bit 0 upward, are the sensor ID (1 bit), the sensor type
// (2 bits), the resolution width (11 bits), the resolution height (11 bits)
// and the frame rate (7 bits). The field boundaries follow the published
// header layout; the numeric encoding of the sensor type is this design's
// own choice (0 color, 1 low-light, 2 infrared).
package sav_pkg;

  localparam int unsigned LINK_W  = 32;  // sensor link word
  localparam int unsigned PIX_W   = 12;  // raw pixel sample
  localparam int unsigned ID_W    = 1;
  localparam int unsigned TYPE_W  = 2;
  localparam int unsigned RES_W   = 11;
  localparam int unsigned FPS_W   = 7;
  localparam int unsigned YCC_W   = 24;  // {Y, Cb, Cr}, 8 bits each

  typedef enum logic [TYPE_W-1:0] {
    SENSOR_COLOR    = 2'd0,
    SENSOR_LOWLIGHT = 2'd1,
    SENSOR_INFRARED = 2'd2
  } sensor_type_e;

  // Packed MSB first, so sensor_id lands on bit 0.
  typedef struct packed {
    logic [FPS_W-1:0]  fps;      // [31:25]
    logic [RES_W-1:0]  height;   // [24:14]
    logic [RES_W-1:0]  width;    // [13:3]
    sensor_type_e      stype;    // [2:1]
    logic [ID_W-1:0]   id;       // [0]
  } stream_header_t;

  // States of the adaptation process.
  typedef enum logic [2:0] {
    AC_IDLE       = 3'd0,
    AC_CHECK_TYPE = 3'd1,
    AC_WAIT_SYNC  = 3'd2,
    AC_LAUNCH_PR  = 3'd3,
    AC_SAVE_TYPE  = 3'd4
  } adapt_state_e;

endpackage
