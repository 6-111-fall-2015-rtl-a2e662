// tb_ball_marker: for random centers in live and replay mode, every pixel in
// a 70x70 area around the center is checked: inside
// [center-HALF, center+HALF) on both axes it must be green (HALF 7) or blue
// (HALF 20 in replay); elsewhere the background must pass through.
`include "tb/tb_util.svh"
module tb_ball_marker;
  import snappa_pkg::*;
  logic [12:0] x_center;
  logic [11:0] y_center;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic replay;
  pixel_t background, pixel;
  int checks = 0, failures = 0;

  ball_marker dut (.x_center, .y_center, .hcount, .vcount, .replay, .background, .pixel);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 12; t++) begin
      int cx, cy, half;
      replay = t[0];
      half = replay ? 20 : 7;
      cx = 40 + $urandom % 900; cy = 40 + $urandom % 700;
      x_center = 13'(cx); y_center = 12'(cy);
      background = 18'h12345;
      for (int dy = -35; dy <= 35; dy++)
        for (int dx = -35; dx <= 35; dx++) begin
          bit in_sq;
          hcount = 11'(cx + dx); vcount = 10'(cy + dy);
          #1;
          in_sq = dx >= -half && dx < half && dy >= -half && dy < half;
          `TB_CHECK(pixel == (in_sq ? (replay ? PIX_BLUE : PIX_GREEN) : background),
                    $sformatf("center %0d,%0d offset %0d,%0d replay %0b pixel %h", cx, cy, dx, dy, replay, pixel))
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
