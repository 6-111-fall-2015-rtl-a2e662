// game_over_text: the "RED WON" / "BLUE WON" banner of the game-over screen.
//
// Combinational. Letters are glyph sprites in 125x200 cells placed relative to
// (XSTART, YSTART): B L U E at +0, +125, +250, +375 in blue, R E D at +50,
// +175, +300 in red, and W O N at +550, +725, +860 in green. red_wins selects
// which team name is drawn; WON is always drawn. Nothing is drawn while
// game_over is low. Pixels off the letters show background. The two inputs
// (game ended, which side won) and the letter positions and colours are the
// document's.
module game_over_text
  import snappa_pkg::*;
#(
  parameter int XSTART    = 20,
  parameter int YSTART    = 400,
  parameter int THICKNESS = 20
) (
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        game_over,
  input  logic        red_wins,
  input  pixel_t      background,
  output pixel_t      pixel
);

  localparam int N_LETTERS = 10;
  localparam glyph_e LETTERS [N_LETTERS] =
    '{GL_B, GL_L, GL_U, GL_E, GL_R, GL_E, GL_D, GL_W, GL_O, GL_N};
  localparam int OFFSETS [N_LETTERS] =
    '{0, 125, 250, 375, 50, 175, 300, 550, 725, 860};

  logic [N_LETTERS-1:0] hits;

  for (genvar i = 0; i < N_LETTERS; i++) begin : g_letter
    glyph #(.XSTART(XSTART + OFFSETS[i]), .YSTART(YSTART),
            .THICKNESS(THICKNESS), .LETTER(LETTERS[i])) u_glyph (
      .hcount(hcount), .vcount(vcount), .hit(hits[i]));
  end

  always_comb begin
    pixel = background;
    if (game_over) begin
      if (hits[9:7] != '0)                   pixel = PIX_GREEN;  // WON
      else if (red_wins && hits[6:4] != '0)  pixel = PIX_RED;    // RED
      else if (!red_wins && hits[3:0] != '0) pixel = PIX_BLUE;   // BLUE
    end
  end

endmodule
