// low_indicator: shows whether the last shot cleared the low line.
//
// Combinational sprite inside the box x_start < hcount < XMAX,
// y_start < vcount < YMAX. With point high it draws a green check mark made of
// two strokes, the short one along v = h + 120 and the long one along
// h + v = x_start + 240; with point low it draws a red X along v = h and
// h + v = x_start + 200. A pixel is on a stroke when it is less than THICKNESS
// away from the line, measured vertically. Shapes, box and thickness are the
// document's.
module low_indicator
  import snappa_pkg::*;
#(
  parameter int THICKNESS = 15,
  parameter int XMAX      = 200,
  parameter int YMAX      = 200
) (
  input  logic        point,
  input  logic [10:0] x_start,
  input  logic [9:0]  y_start,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  pixel_t      background,
  output pixel_t      pixel
);

  // Distance of (h, v) from a line, in signed arithmetic.
  function automatic logic near(input int signed d);
    return d > -THICKNESS && d < THICKNESS;
  endfunction

  int signed h, v, x0;
  logic in_box, stroke_a, stroke_b;

  always_comb begin
    h  = int'(hcount);
    v  = int'(vcount);
    x0 = int'(x_start);
    in_box = hcount > x_start && hcount < 11'(XMAX) &&
             vcount > y_start && vcount < 10'(YMAX);
    if (point) begin
      stroke_a = near(v - h - 120);
      stroke_b = near(h + v - x0 - 240);
    end else begin
      stroke_a = near(v - h);
      stroke_b = near(h + v - x0 - 200);
    end
    pixel = background;
    if (in_box && (stroke_a || stroke_b)) pixel = point ? PIX_GREEN : PIX_RED;
  end

endmodule
