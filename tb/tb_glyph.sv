// tb_glyph: one instance of every letter at (100,50). Each is probed at the
// same nine points (stems, bars, centre, outside) and compared with how the
// letter is drawn: B D E L N O R U W, 75x150 pixel box, strokes 20 wide.
`include "tb/tb_util.svh"
module tb_glyph;
  import snappa_pkg::*;
  localparam int X0 = 100, Y0 = 50;
  localparam glyph_e LETTERS [9] = '{GL_B, GL_D, GL_E, GL_L, GL_N, GL_O, GL_R, GL_U, GL_W};
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [8:0] hit;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 9; i++) begin : g_dut
    glyph #(.XSTART(X0), .YSTART(Y0), .LETTER(LETTERS[i])) dut (.hcount, .vcount, .hit(hit[i]));
  end

  // probe points: left stem, upper right stem, lower right stem, top bar,
  // middle bar, bottom bar, centre below middle, outside left-top, right of box
  int px [9] = '{37, 87, 87, 62, 62, 62, 62, 10, 112};
  int py [9] = '{100, 70, 130, 37, 100, 162, 125, 10, 100};
  string names [9] = '{"B", "D", "E", "L", "N", "O", "R", "U", "W"};
  // expected hit per letter, bit k = probe k
  bit [8:0] want [9] = '{
    9'b000111111,   // B: stems, top, middle, bottom
    9'b000101111,   // D: no middle bar
    9'b000111001,   // E
    9'b000100001,   // L
    9'b001010111,   // N: diagonal crosses middle and centre
    9'b000101111,   // O
    9'b001011011,   // R: upper bowl, leg through centre
    9'b000100111,   // U
    9'b001110111    // W: centre stem
  };

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 9; p++) begin
      hcount = 11'(X0 + px[p]); vcount = 10'(Y0 + py[p]); #1;
      for (int l = 0; l < 9; l++)
        `TB_CHECK(hit[l] == want[l][p], $sformatf("letter %s probe %0d (%0d,%0d) hit %0b", names[l], p, px[p], py[p], hit[l]))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
