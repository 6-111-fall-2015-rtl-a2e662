// tb_game_over_text: the words are placed at (20,400). Probes the left stem
// of B (only drawn when blue won), points of R and E that no blue letter
// covers (only when red won), the stems of W, O and N (green in both cases),
// and a point between the words; before the game is over nothing is drawn.
`include "tb/tb_util.svh"
module tb_game_over_text;
  import snappa_pkg::*;
  localparam int X0 = 20, Y0 = 400;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic red_wins, game_over;
  pixel_t background, pixel;
  int checks = 0, failures = 0;

  game_over_text dut (.hcount, .vcount, .game_over, .red_wins, .background, .pixel);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(int dx, int dy, pixel_t want, string what);
    hcount = 11'(X0 + dx); vcount = 10'(Y0 + dy); #1;
    `TB_CHECK(pixel == want, $sformatf("%s (red_wins %0b) at +%0d,+%0d: %h", what, red_wins, dx, dy, pixel))
  endtask

  initial begin
    background = 18'h02020;
    game_over = 0;
    for (int w = 0; w < 2; w++) begin
      red_wins = w[0];
      probe(37, 100, background, "B left stem before game over");
      probe(50 + 37, 100, background, "R left stem before game over");
      probe(550 + 37, 100, background, "W left stem before game over");
    end
    game_over = 1;
    for (int w = 0; w < 2; w++) begin
      red_wins = w[0];
      probe(37, 100, red_wins ? background : PIX_BLUE, "B left stem");
      probe(50 + 37, 100, red_wins ? PIX_RED : background, "R left stem");
      probe(375 + 37, 37, red_wins ? background : PIX_BLUE, "last E top bar");
      probe(175 + 62, 37, red_wins ? PIX_RED : background, "E of RED top bar");
      probe(550 + 37, 100, PIX_GREEN, "W left stem");
      probe(725 + 62, 37, PIX_GREEN, "O top");
      probe(860 + 87, 100, PIX_GREEN, "N right stem");
      probe(500, 100, background, "gap before WON");
      probe(37, 250, background, "below the words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
