// tb_seg_digit: draws every value 0..15 with the digit at (100,50) and probes
// the middle of each of the seven segments plus points in the two hollow
// squares and outside the digit. Expected segments come from the usual
// seven-segment table (values above 9 show only the middle bar, a dash).
`include "tb/tb_util.svh"
module tb_seg_digit;
  import snappa_pkg::*;
  localparam int X0 = 100, Y0 = 50;
  logic [3:0] value;
  logic [10:0] hcount;
  logic [9:0] vcount;
  pixel_t background, pixel;
  int checks = 0, failures = 0;

  seg_digit #(.XSTART(X0), .YSTART(Y0), .COLOR(PIX_MAGENTA)) dut (.value, .hcount, .vcount, .background, .pixel);

  // segments a..g: top, upper right, lower right, bottom, lower left, upper left, middle
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "g", "g", "g", "g", "g", "g"};
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

  initial begin
    background = 18'h00f0f;
    for (int n = 0; n < 16; n++) begin
      value = 4'(n);
      for (int s = 0; s < 7; s++) begin
        hcount = 11'(X0 + seg_x[s]); vcount = 10'(Y0 + seg_y[s]); #1;
        `TB_CHECK(pixel == (has(lit[n], byte'("a" + s)) ? PIX_MAGENTA : background),
                  $sformatf("value %0d segment %s pixel %h", n, string'(byte'("a" + s)), pixel))
      end
      // the two hollow squares and outside the digit
      hcount = 11'(X0 + 50); vcount = 10'(Y0 + 50);  #1;
      `TB_CHECK(pixel == background, $sformatf("value %0d upper hole lit", n))
      hcount = 11'(X0 + 50); vcount = 10'(Y0 + 150); #1;
      `TB_CHECK(pixel == background, $sformatf("value %0d lower hole lit", n))
      hcount = 11'(X0 + 110); vcount = 10'(Y0 + 100); #1;
      `TB_CHECK(pixel == background, $sformatf("value %0d right of digit lit", n))
      hcount = 11'(X0 + 50); vcount = 10'(Y0 + 210); #1;
      `TB_CHECK(pixel == background, $sformatf("value %0d below digit lit", n))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
