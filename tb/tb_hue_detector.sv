// tb_hue_detector: random pixels (hue biased towards the four colour ranges)
// at random raster positions, with the colour selection, the display mode
// and the tracking center changed every 40 clocks (center (0,0) half of the
// time, meaning the whole camera area). match and test_rgb are compared two
// clocks later with a reference written from the range table: red 00..18,
// blue 96..BE, green 20..3F, yellow 10..2F (exclusive), saturation 30..B0,
// value 30..F0, window +-50 around the center clipped to 150..850 x 260..750.
`include "tb/tb_util.svh"
module tb_hue_detector;
  import snappa_pkg::*;
  logic clk = 0;
  logic [7:0] h, s, v;
  logic [1:0] color;
  logic background;
  pixel_t rgb, test_rgb;
  logic [10:0] hcount, x_center;
  logic [9:0] vcount, y_center;
  logic match;
  int checks = 0, failures = 0, n_matched = 0;
  logic exp_match [$];
  pixel_t exp_rgb [$];

  always #5 clk = ~clk;

  hue_detector dut (.clk, .h, .s, .v, .color, .background, .rgb, .hcount, .vcount,
                    .x_center, .y_center, .test_rgb, .match);

  function automatic bit in_window(int hc, int vc, int cx, int cy);
    int xs, xe, ys, ye;
    if (cx == 0 && cy == 0) begin xs = 150; xe = 850; ys = 260; ye = 750; end
    else begin
      xs = (cx < 200) ? 150 : cx - 50;
      xe = (cx > 800) ? 850 : cx + 50;
      ys = (cy < 310) ? 260 : cy - 50;
      ye = (cy > 700) ? 750 : cy + 50;
    end
    return hc > xs && hc < xe && vc > ys && vc < ye;
  endfunction

  function automatic bit hue_ok(int sel, int hue);
    case (sel)
      0: return hue > 'h00 && hue < 'h18;
      1: return hue > 'h96 && hue < 'hBE;
      2: return hue > 'h20 && hue < 'h3F;
      default: return hue > 'h10 && hue < 'h2F;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settle;
    color = 0; background = 1; x_center = 0; y_center = 0;
    h = 0; s = 0; v = 0; rgb = 0; hcount = 0; vcount = 0;
    settle = 0;
    for (int i = 0; i < 20000; i++) begin
      bit hh, ss, vv, win;
      @(negedge clk);
      if (exp_match.size() == 2) begin
        logic em; pixel_t er;
        em = exp_match.pop_front(); er = exp_rgb.pop_front();
        if (settle == 0) begin
          `TB_CHECK(match == em, $sformatf("match %0b expected %0b", match, em))
          `TB_CHECK(test_rgb == er, $sformatf("test_rgb %h expected %h", test_rgb, er))
          if (em) n_matched++;
        end
      end
      if (settle > 0) settle--;
      if (i % 40 == 0) begin
        color = 2'($urandom);
        background = 1'($urandom);
        if ($urandom % 2) begin x_center = 0; y_center = 0; end
        else begin x_center = 11'(120 + $urandom % 760); y_center = 10'(230 + $urandom % 550); end
        settle = 4;
        exp_match.delete(); exp_rgb.delete();
      end
      case ($urandom % 5)
        0: h = 8'(1 + $urandom % 22);
        1: h = 8'('h97 + $urandom % 38);
        2: h = 8'('h21 + $urandom % 29);
        3: h = 8'('h11 + $urandom % 29);
        default: h = 8'($urandom);
      endcase
      s = 8'($urandom); v = 8'($urandom); rgb = 18'($urandom);
      if (x_center != 0 && $urandom % 2) begin
        hcount = 11'(int'(x_center) - 60 + $urandom % 120);
        vcount = 10'(int'(y_center) - 60 + $urandom % 120);
      end else begin
        hcount = 11'(100 + $urandom % 800);
        vcount = 10'(220 + $urandom % 580);
      end
      win = in_window(hcount, vcount, x_center, y_center);
      hh = win && hue_ok(color, h);
      ss = s > 'h30 && s < 'hB0;
      vv = v > 'h30 && v < 'hF0;
      exp_match.push_back(hh && ss && vv);
      if (!background) exp_rgb.push_back(rgb);
      else if (!hh)    exp_rgb.push_back(PIX_BLACK);
      else if (!ss)    exp_rgb.push_back(PIX_GREEN);
      else if (!vv)    exp_rgb.push_back(PIX_BLUE);
      else             exp_rgb.push_back(PIX_MAGENTA);
    end
    `TB_CHECK(n_matched > 100, $sformatf("only %0d matching pixels exercised", n_matched))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
