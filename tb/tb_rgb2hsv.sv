// tb_rgb2hsv: random RGB pixels, one per clock, plus pure colours and greys.
// H, S and V are compared with a reference computed here from the HSV
// definitions on a 0..255 hue circle (red 0, green 85, blue 170), exactly 23
// clocks after the input (18-clock dividers plus five stages).
`include "tb/tb_util.svh"
module tb_rgb2hsv;
  localparam int LAT = 23;
  logic clk = 0, rst;
  logic [7:0] r, g, b, h, s, v;
  int checks = 0, failures = 0;
  int eh [$], es [$], ev [$];

  always #5 clk = ~clk;

  rgb2hsv dut (.clk, .rst, .r, .g, .b, .h, .s, .v);

  task automatic reference(input int rr, input int gg, input int bb);
    int mx, mn, d, num, frac, base, hue;
    bit neg;
    mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
    mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
    d = mx - mn;
    if (rr == mx)      begin base = 0;   num = gg - bb; end
    else if (gg == mx) begin base = 85;  num = bb - rr; end
    else               begin base = 170; num = rr - gg; end
    neg = num < 0;
    if (neg) num = -num;
    frac = (num * 255) / ((d == 0 ? 1 : d) * 6);
    if (!neg)              hue = base + frac;
    else if (frac > base)  hue = 255 - frac + base;
    else                   hue = base - frac;
    eh.push_back(hue & 255);
    es.push_back((255 * d) / (mx == 0 ? 1 : mx));
    ev.push_back(mx);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; r = 0; g = 0; b = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // Drain the pipeline with zeros so the reference queue starts aligned.
    for (int i = 0; i < LAT + 2; i++) @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      if (i >= LAT) begin
        int xh, xs, xv;
        xh = eh.pop_front(); xs = es.pop_front(); xv = ev.pop_front();
        `TB_CHECK(h == xh && s == xs && v == xv,
                  $sformatf("hsv %0d %0d %0d expected %0d %0d %0d", h, s, v, xh, xs, xv))
      end
      case (i % 8)
        0: {r, g, b} = {8'd255, 8'd0, 8'd0};
        1: {r, g, b} = {8'd0, 8'd0, 8'd255};
        2: {r, g, b} = {8'd100, 8'd100, 8'd100};
        default: {r, g, b} = 24'($urandom);
      endcase
      reference(r, g, b);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
