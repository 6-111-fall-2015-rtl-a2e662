// tb_low_indicator: scans the whole 220x220 corner of the screen with the
// indicator at (30,30) for both results. Points named on the shapes are
// checked (the crossing of the X, both ends of the check mark's strokes) and
// every pixel is compared with the stroke geometry: X along v=h and
// h+v=230, check mark along v=h+120 and h+v=270, 15 pixels thick, inside
// 30<h<200, 30<v<200.
`include "tb/tb_util.svh"
module tb_low_indicator;
  import snappa_pkg::*;
  logic point;
  logic [10:0] hcount;
  logic [9:0] vcount;
  pixel_t background, pixel;
  int checks = 0, failures = 0;

  low_indicator dut (.point, .x_start(11'd30), .y_start(10'd30), .hcount, .vcount, .background, .pixel);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(int h, int v, pixel_t want, string what);
    hcount = 11'(h); vcount = 10'(v); #1;
    `TB_CHECK(pixel == want, $sformatf("%s at %0d,%0d: %h", what, h, v, pixel))
  endtask

  initial begin
    background = 18'h01010;
    point = 0;
    probe(115, 115, PIX_RED, "X crossing");
    probe(40, 40, PIX_RED, "X top-left arm");
    probe(190, 40, PIX_RED, "X top-right arm");
    probe(115, 60, background, "inside the X's upper gap");
    probe(250, 250, background, "outside the box");
    point = 1;
    probe(40, 160, PIX_GREEN, "check short stroke");
    probe(70, 195, PIX_GREEN, "check corner");
    probe(190, 80, PIX_GREEN, "check long stroke top");
    probe(115, 115, background, "check mark leaves the centre empty");
    for (int p = 0; p < 2; p++) begin
      point = p[0];
      for (int v = 0; v < 220; v++) for (int h = 0; h < 220; h++) begin
        bit in_box, on;
        in_box = h > 30 && h < 200 && v > 30 && v < 200;
        if (point) on = (v - h - 120 > -15 && v - h - 120 < 15) || (h + v - 270 > -15 && h + v - 270 < 15);
        else       on = (v - h > -15 && v - h < 15) || (h + v - 230 > -15 && h + v - 230 < 15);
        hcount = 11'(h); vcount = 10'(v); #1;
        `TB_CHECK(pixel == ((in_box && on) ? (point ? PIX_GREEN : PIX_RED) : background),
                  $sformatf("point %0b at %0d,%0d: %h", point, h, v, pixel))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
