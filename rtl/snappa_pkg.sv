// snappa_pkg: types and constants shared by the Snappa referee video pipeline.
//
// Pixels travel through the display path as 18-bit RGB, six bits per channel,
// packed {red, green, blue}. The camera picture is placed on the 1024x768 XGA
// raster with its top-left corner at (CAM_X0, CAM_Y0); the tracking window, the
// threshold lines and the referee's height comparisons all use these offsets.
// The referee state encoding (1..7) is the one the game-logic state machine
// exposes on its 3-bit state output.
package snappa_pkg;

  typedef logic [17:0] pixel_t;

  localparam pixel_t PIX_BLACK   = 18'h00000;
  localparam pixel_t PIX_RED     = {6'h3f, 6'h00, 6'h00};
  localparam pixel_t PIX_GREEN   = {6'h00, 6'h3f, 6'h00};
  localparam pixel_t PIX_BLUE    = {6'h00, 6'h00, 6'h3f};
  localparam pixel_t PIX_MAGENTA = {6'h3f, 6'h00, 6'h3f};
  localparam pixel_t PIX_WHITE   = {6'h3f, 6'h3f, 6'h3f};

  // Placement of the camera image on the XGA raster.
  localparam int CAM_X0 = 150;
  localparam int CAM_Y0 = 250;

  // Referee states, numbered as on the state output.
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd1,
    ST_REPLAY     = 3'd2,
    ST_LOW_BEFORE = 3'd3,  // recording, ball not yet above the low line
    ST_HIGH       = 3'd4,  // recording, ball above the low line
    ST_LOW_AFTER  = 3'd5,  // recording, ball came back below the low line
    ST_END_PLAY   = 3'd6,  // recording the tail of the shot before idling
    ST_GAME_OVER  = 3'd7
  } ref_state_e;

  // Letters of the game-over banner.
  typedef enum logic [3:0] {
    GL_B, GL_D, GL_E, GL_L, GL_N, GL_O, GL_R, GL_U, GL_W
  } glyph_e;

endpackage
