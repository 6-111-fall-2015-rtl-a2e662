// tb_line_sprite: for several heights and both line kinds, pixels around the
// line row (height + 250) and around the line ends (columns 150 and 870) are
// checked: the line covers rows within 4 of that row and columns 151..869,
// red for the low line and green for the table line.
`include "tb/tb_util.svh"
module tb_line_sprite;
  import snappa_pkg::*;
  logic [9:0] height;
  logic is_low;
  logic [10:0] hcount;
  logic [9:0] vcount;
  pixel_t background, pixel;
  int checks = 0, failures = 0;
  int cols [] = '{0, 149, 150, 151, 400, 868, 869, 870, 871, 1000};

  line_sprite dut (.height, .is_low, .hcount, .vcount, .background, .pixel);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int heights [] = '{0, 75, 200, 400, 490};
    background = 18'h0abcd;
    foreach (heights[k]) for (int kind = 0; kind < 2; kind++) begin
      height = 10'(heights[k]); is_low = kind[0];
      for (int dv = -8; dv <= 8; dv++) foreach (cols[c]) begin
        bit on;
        vcount = 10'(heights[k] + 250 + dv); hcount = 11'(cols[c]);
        #1;
        on = cols[c] > 150 && cols[c] < 870 && dv > -5 && dv < 5;
        `TB_CHECK(pixel == (on ? (is_low ? PIX_RED : PIX_GREEN) : background),
                  $sformatf("height %0d row offset %0d col %0d pixel %h", heights[k], dv, cols[c], pixel))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
