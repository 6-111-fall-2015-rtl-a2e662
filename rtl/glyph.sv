// glyph: one letter of the game-over banner as a combinational sprite.
//
// The letter occupies the open box x 25..100, y 25..175 of a 125x200 cell
// whose top-left corner is (XSTART, YSTART). It is built from strokes:
// a left stem (x 25..50), a right stem (x 75..100), a top bar (y 25..50), a
// middle bar (y 90..110) and a bottom bar (y 150..175), plus diagonals for N
// (from the top of the left stem to the foot of the right stem) and for the
// leg of R; a diagonal covers pixels whose distance from its centre line is
// under about THICKNESS/2 horizontally. B, D and R leave the right-hand
// corners open so they read as rounded. W is a U with a short centre stem in
// its lower half. hit is high on the letter's pixels.
// The cell and box sizes, the stroke approach and the THICKNESS parameter are
// the document's; the stroke set of each letter is this design's own.
module glyph
  import snappa_pkg::*;
#(
  parameter int     XSTART    = 0,
  parameter int     YSTART    = 0,
  parameter int     THICKNESS = 20,
  parameter glyph_e LETTER    = GL_O
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic        hit
);

  int signed x, y, d_n, d_r;
  logic in_box, lstem, rstem, top, mid, bot, left_part, diag_n, leg_r, ctr;

  always_comb begin
    x = int'(hcount) - XSTART;
    y = int'(vcount) - YSTART;
    in_box    = x > 25 && x < 100 && y > 25 && y < 175;
    lstem     = x < 50;
    rstem     = x > 75;
    top       = y < 50;
    mid       = y > 90 && y < 110;
    bot       = y > 150;
    left_part = x < 75;
    d_n       = (y - 25) - 6 * (x - 50);
    diag_n    = x >= 50 && x <= 75 && d_n > -2*THICKNESS && d_n < 2*THICKNESS;
    d_r       = 3 * (y - 110) - 4 * (x - 50);
    leg_r     = x > 50 && y > 110 && d_r > -THICKNESS*3/2 && d_r < THICKNESS*3/2;
    ctr       = x > 55 && x < 70 && y > 90;
    unique case (LETTER)
      GL_B: hit = lstem || (left_part && (top || mid || bot)) ||
                  (rstem && ((y > 50 && y < 90) || (y > 110 && y < 150)));
      GL_D: hit = lstem || (left_part && (top || bot)) || (rstem && y > 50 && y < 150);
      GL_E: hit = lstem || top || mid || bot;
      GL_L: hit = lstem || bot;
      GL_N: hit = lstem || rstem || diag_n;
      GL_O: hit = lstem || rstem || top || bot;
      GL_R: hit = lstem || (left_part && (top || mid)) || (rstem && y > 50 && y < 90) || leg_r;
      GL_U: hit = lstem || rstem || bot;
      GL_W: hit = lstem || rstem || bot || ctr;
      default: hit = 1'b0;
    endcase
    hit = hit && in_box;
  end

endmodule
