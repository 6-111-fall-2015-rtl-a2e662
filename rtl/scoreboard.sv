// scoreboard: "left - right" score display at the top of the screen.
//
// Three seven-segment sprites in a row starting at (XSTART, YSTART), PITCH
// pixels apart: the left team's score in red, a fixed white dash, the right
// team's score in blue. Combinational. The three-sprite arrangement, the fixed
// dash and the team colours are the document's; the positions are this
// design's choice.
module scoreboard
  import snappa_pkg::*;
#(
  parameter int XSTART = 300,
  parameter int YSTART = 20,
  parameter int PITCH  = 150
) (
  input  logic [3:0]  left_score,
  input  logic [3:0]  right_score,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  pixel_t      background,
  output pixel_t      pixel
);

  pixel_t after_left, after_dash;

  seg_digit #(.XSTART(XSTART), .YSTART(YSTART), .COLOR(PIX_RED)) u_left (
    .value(left_score), .hcount(hcount), .vcount(vcount),
    .background(background), .pixel(after_left));

  seg_digit #(.XSTART(XSTART + PITCH), .YSTART(YSTART), .COLOR(PIX_WHITE)) u_dash (
    .value(4'hF), .hcount(hcount), .vcount(vcount),
    .background(after_left), .pixel(after_dash));

  seg_digit #(.XSTART(XSTART + 2*PITCH), .YSTART(YSTART), .COLOR(PIX_BLUE)) u_right (
    .value(right_score), .hcount(hcount), .vcount(vcount),
    .background(after_dash), .pixel(pixel));

endmodule
