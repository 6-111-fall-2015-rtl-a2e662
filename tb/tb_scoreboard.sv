// tb_scoreboard: random score pairs; probes the segments of the left digit
// (red), the dash (white, middle bar only) and the right digit (blue), each
// 150 pixels apart starting at (300,20).
`include "tb/tb_util.svh"
module tb_scoreboard;
  import snappa_pkg::*;
  logic [3:0] left_score, right_score;
  logic [10:0] hcount;
  logic [9:0] vcount;
  pixel_t background, pixel;
  int checks = 0, failures = 0;

  scoreboard dut (.left_score, .right_score, .hcount, .vcount, .background, .pixel);

  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int seg_x [7] = '{50, 90, 90, 50, 10, 10, 50};
  int seg_y [7] = '{10, 50, 150, 190, 150, 50, 100};

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit has(string s, byte c);
    for (int i = 0; i < s.len(); i++) if (s[i] == c) return 1;
    return 0;
  endfunction

  task automatic probe(int h, int v, pixel_t want, string what);
    hcount = 11'(h); vcount = 10'(v); #1;
    `TB_CHECK(pixel == want, $sformatf("%s at %0d,%0d: %h", what, h, v, pixel))
  endtask

  initial begin
    background = 18'h00003;
    for (int t = 0; t < 20; t++) begin
      int l, r;
      l = $urandom % 10; r = $urandom % 10;
      left_score = 4'(l); right_score = 4'(r);
      for (int s = 0; s < 7; s++) begin
        probe(300 + seg_x[s], 20 + seg_y[s], has(lit[l], byte'("a" + s)) ? PIX_RED : background, $sformatf("left %0d seg %0d", l, s));
        probe(450 + seg_x[s], 20 + seg_y[s], s == 6 ? PIX_WHITE : background, $sformatf("dash seg %0d", s));
        probe(600 + seg_x[s], 20 + seg_y[s], has(lit[r], byte'("a" + s)) ? PIX_BLUE : background, $sformatf("right %0d seg %0d", r, s));
      end
      probe(250, 100, background, "left of board");
      probe(500, 300, background, "below board");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
