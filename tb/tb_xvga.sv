// tb_xvga: checks the XGA raster generator over two full frames.
// Every clock, hsync, vsync and blank are compared with the expected window
// for the current hcount/vcount, and the counters must step by one and wrap
// at 1344 pixels and 806 lines; a frame must take 1344*806 clocks.
`include "tb/tb_util.svh"
module tb_xvga;
  logic clk = 0;
  logic rst;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, blank;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xvga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_h, exp_v, frame_start, frames, errs;
    rst = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    `TB_CHECK(hcount == 0 && vcount == 0, "counters start at zero")
    exp_h = 0; exp_v = 0; frames = 0; errs = 0; frame_start = 0;
    for (int unsigned cyc = 0; cyc < 2 * 1344 * 806 + 10; cyc++) begin
      if (hcount != exp_h || vcount != exp_v) errs++;
      if (hsync != !(exp_h >= 1048 && exp_h <= 1183)) errs++;
      if (vsync != !(exp_v >= 777 && exp_v <= 782)) errs++;
      if (blank != (exp_h >= 1024 || exp_v >= 768)) errs++;
      if (exp_h == 0 && exp_v == 0 && cyc != 0) begin
        `TB_CHECK(cyc - frame_start == 1344 * 806,
                  $sformatf("frame length %0d", cyc - frame_start))
        frame_start = cyc;
        frames++;
      end
      if ((cyc % 50000) == 0) begin
        `TB_CHECK(errs == 0, $sformatf("raster mismatch count %0d near h=%0d v=%0d", errs, exp_h, exp_v))
      end
      exp_h = (exp_h == 1343) ? 0 : exp_h + 1;
      if (exp_h == 0) exp_v = (exp_v == 805) ? 0 : exp_v + 1;
      @(negedge clk);
    end
    `TB_CHECK(errs == 0, "no raster mismatches")
    `TB_CHECK(frames == 2, "two frame wraps seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
