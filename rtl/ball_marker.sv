// ball_marker: draws a square on the tracked ball.
//
// Combinational sprite. A pixel lies on the marker when
//   x_center - HALF <= hcount < x_center + HALF  (likewise for vcount),
// with HALF = LIVE_HALF (green marker) during play and REPLAY_HALF (blue, a
// larger stand-in for the ball) while a recorded shot is replayed; other
// pixels show background. The sizes and colours are the document's.
module ball_marker
  import snappa_pkg::*;
#(
  parameter int LIVE_HALF   = 7,
  parameter int REPLAY_HALF = 20
) (
  input  logic [12:0] x_center,
  input  logic [11:0] y_center,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        replay,
  input  pixel_t      background,
  output pixel_t      pixel
);

  logic [13:0] half, hx, vy, cx, cy;

  always_comb begin
    half  = replay ? 14'(REPLAY_HALF) : 14'(LIVE_HALF);
    hx    = 14'(hcount);
    vy    = 14'(vcount);
    cx    = 14'(x_center);
    cy    = 14'(y_center);
    pixel = background;
    if (hx + half >= cx && hx < cx + half && vy + half >= cy && vy < cy + half)
      pixel = replay ? PIX_BLUE : PIX_GREEN;
  end

endmodule
