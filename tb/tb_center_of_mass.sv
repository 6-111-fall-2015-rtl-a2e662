// tb_center_of_mass: a small raster (100 clocks per line, 40 lines, area
// 10..40 x 5..30) drives the block. Each frame a random rectangle of matching
// pixels, sometimes none, is presented. After each frame the center must be
// the integer mean of the matched coordinates (computed here), a frame with
// no matches must keep the previous center, final_count must equal the number
// of matches, done must pulse exactly once per frame, DIV_LATENCY+2 clocks after the
// raster passes the close-of-frame point (the monitor, sampling on the next edge, sees 37), and in smooth
// mode the center must be the mean of the last four non-empty frame centers.
`include "tb/tb_util.svh"
module tb_center_of_mass;
  localparam int HT = 100, VT = 40;
  localparam int XMIN = 10, XMAX = 40, YMIN = 5, YMAX = 30;
  logic clk = 0, rst, smooth, match, done;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [12:0] x_center;
  logic [11:0] y_center;
  logic [23:0] final_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  center_of_mass #(.XMIN(XMIN), .XMAX(XMAX), .YMIN(YMIN), .YMAX(YMAX)) dut (
    .clk, .rst, .smooth, .match, .hcount, .vcount, .x_center, .y_center, .final_count, .done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x0, x1, y0, y1;      // current blob (inclusive); x0 > x1 means none
  int close_cycle, cycle, done_count, done_at;
  always @(posedge clk) begin
    cycle++;
    if (done) begin done_count++; done_at = cycle; end
  end

  task automatic run_frame(output int ex, output int ey, output int n);
    longint sx, sy;
    sx = 0; sy = 0; n = 0;
    for (int v = 0; v < VT; v++)
      for (int h = 0; h < HT; h++) begin
        @(negedge clk);
        hcount = 11'(h); vcount = 10'(v);
        match = (h >= x0 && h <= x1 && v >= y0 && v <= y1);
        if (match && h >= XMIN && h <= XMAX && v >= YMIN && v <= YMAX &&
            !(h == XMIN && v == YMIN)) begin
          sx += h; sy += v; n++;
        end
        if (h == XMAX + 50 && v == YMAX) close_cycle = cycle;
      end
    ex = (n == 0) ? -1 : int'(sx / n);
    ey = (n == 0) ? -1 : int'(sy / n);
  endtask

  initial begin
    int ex, ey, n, last_x, last_y, hx [$], hy [$];
    rst = 1; smooth = 0; match = 0; hcount = 0; vcount = 0; cycle = 0; done_count = 0;
    x0 = 1; x1 = 0; y0 = 1; y1 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    last_x = 0; last_y = 0;
    for (int f = 0; f < 24; f++) begin
      int prev_done;
      smooth = (f >= 14);
      if (f % 5 == 3) begin x0 = 1; x1 = 0; end
      else begin
        x0 = 11 + $urandom % 25; x1 = x0 + $urandom % 8;
        y0 = 6 + $urandom % 20;  y1 = y0 + $urandom % 6;
        if (f == 7) begin x0 = 0; x1 = 60; y0 = 0; y1 = 35; end  // spills out of the area
      end
      prev_done = done_count;
      run_frame(ex, ey, n);
      if (n > 0) begin
        hx.push_front(ex); hy.push_front(ey);
        if (smooth && hx.size() >= 4) begin
          ex = (hx[0] + hx[1] + hx[2] + hx[3]) / 4;
          ey = (hy[0] + hy[1] + hy[2] + hy[3]) / 4;
        end
      end
      if (f == 0) continue;  // first frame starts mid-way through accumulation
      `TB_CHECK(done_count == prev_done + 1, $sformatf("frame %0d: done pulses %0d", f, done_count - prev_done))
      `TB_CHECK(done_at - close_cycle == 37, $sformatf("frame %0d: done %0d clocks after close", f, done_at - close_cycle))
      `TB_CHECK(final_count == n, $sformatf("frame %0d: count %0d expected %0d", f, final_count, n))
      if (n == 0) begin
        `TB_CHECK(x_center == last_x && y_center == last_y, $sformatf("frame %0d: empty frame changed center", f))
      end else begin
        `TB_CHECK(x_center == ex && y_center == ey,
                  $sformatf("frame %0d: center %0d,%0d expected %0d,%0d", f, x_center, y_center, ex, ey))
      end
      last_x = x_center; last_y = y_center;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
