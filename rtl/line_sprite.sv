// line_sprite: a horizontal line across the camera image.
//
// Combinational sprite. The line is THICKNESS lines thick and ends at the
// row YOFFSET + height (rows YOFFSET+height-THICKNESS+1 .. YOFFSET+height+
// THICKNESS-1 are covered, i.e. strictly within THICKNESS of that row), and
// spans the columns strictly between XMIN and XMAX. It is red for the low
// (threshold) line (is_low = 1) and green for the table line. The geometry
// and colours are the document's.
module line_sprite
  import snappa_pkg::*;
#(
  parameter int THICKNESS = 5,
  parameter int YOFFSET   = 250,
  parameter int XMIN      = 150,
  parameter int XMAX      = 870
) (
  input  logic [9:0]  height,
  input  logic        is_low,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  pixel_t      background,
  output pixel_t      pixel
);

  logic [11:0] row, v;
  assign row = 12'(height) + 12'(YOFFSET);
  assign v   = 12'(vcount);

  always_comb begin
    pixel = background;
    if (hcount > 11'(XMIN) && hcount < 11'(XMAX) &&
        v + 12'(THICKNESS) > row && v < row + 12'(THICKNESS))
      pixel = is_low ? PIX_RED : PIX_GREEN;
  end

endmodule
