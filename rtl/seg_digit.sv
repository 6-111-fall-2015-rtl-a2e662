// seg_digit: a seven-segment digit drawn as a 100x200 sprite.
//
// Combinational sprite with its top-left corner at (XSTART, YSTART). Segments,
// with their open boxes relative to that corner:
//   A top     x 20..80,  y 0..20      B upper right x 80..100, y 0..100
//   C lower right x 80..100, y 100..200   D bottom x 20..80, y 180..200
//   E lower left  x 0..20,  y 100..200    F upper left x 0..20, y 0..100
//   G middle  x 20..80,  y 90..110
// Values 0..9 light the usual segments; any other value draws a dash (G only).
// Lit segment pixels take COLOR, all others show background. Geometry and the
// segment patterns of 2..9 and of the dash are the document's; 0 and 1 use the
// conventional patterns.
module seg_digit
  import snappa_pkg::*;
#(
  parameter int     XSTART = 0,
  parameter int     YSTART = 0,
  parameter pixel_t COLOR  = PIX_WHITE
) (
  input  logic [3:0]  value,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  pixel_t      background,
  output pixel_t      pixel
);

  logic [6:0] seg;  // {A,B,C,D,E,F,G}

  always_comb begin
    unique case (value)
      4'd0:    seg = 7'b1111110;
      4'd1:    seg = 7'b0110000;
      4'd2:    seg = 7'b1101101;
      4'd3:    seg = 7'b1111001;
      4'd4:    seg = 7'b0110011;
      4'd5:    seg = 7'b1011011;
      4'd6:    seg = 7'b1011111;
      4'd7:    seg = 7'b1110000;
      4'd8:    seg = 7'b1111111;
      4'd9:    seg = 7'b1111011;
      default: seg = 7'b0000001;
    endcase
  end

  int signed x, y;
  logic [6:0] in_seg;

  function automatic logic box(input int signed px, input int signed py,
                               input int x0, input int x1, input int y0, input int y1);
    return px > x0 && px < x1 && py > y0 && py < y1;
  endfunction

  always_comb begin
    x = int'(hcount) - XSTART;
    y = int'(vcount) - YSTART;
    in_seg[6] = box(x, y, 20, 80, 0, 20);     // A
    in_seg[5] = box(x, y, 80, 100, 0, 100);   // B
    in_seg[4] = box(x, y, 80, 100, 100, 200); // C
    in_seg[3] = box(x, y, 20, 80, 180, 200);  // D
    in_seg[2] = box(x, y, 0, 20, 100, 200);   // E
    in_seg[1] = box(x, y, 0, 20, 0, 100);     // F
    in_seg[0] = box(x, y, 20, 80, 90, 110);   // G
    pixel = ((in_seg & seg) != '0) ? COLOR : background;
  end

endmodule
