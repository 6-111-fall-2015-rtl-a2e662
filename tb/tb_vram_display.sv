// tb_vram_display: a frame-buffer model that returns each word two clocks
// after its address, filled with a pattern that encodes the address. The
// raster is driven over the end of one line into the next and over the last
// line of the frame. With the 8-pixel look-ahead, the pixel shown at hcount h
// must be the stored pixel of raster position h+4 (next line when that passes
// the line end, line 0 after the last line).
`include "tb/tb_util.svh"
module tb_vram_display;
  localparam int H_TOTAL = 1344, V_TOTAL = 806;
  logic clk = 0, rst;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic [17:0] vr_pixel;
  logic [18:0] vram_addr;
  logic [35:0] vram_read_data, pipe1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vram_display dut (.clk, .rst, .hcount, .vcount, .vr_pixel, .vram_addr, .vram_read_data);

  function automatic logic [35:0] word_at(logic [18:0] a);
    return {a[17:0] ^ 18'h2aaaa, a[17:0]};
  endfunction

  function automatic logic [17:0] pixel_at(int v, int x);
    logic [18:0] a;
    logic [35:0] w;
    a = {10'(v), 9'(x >> 1)};
    w = word_at(a);
    return (x % 2 == 0) ? w[35:18] : w[17:0];
  endfunction

  // Two-clock read latency.
  always @(posedge clk) begin
    pipe1          <= word_at(vram_addr);
    vram_read_data <= pipe1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_from(int v0, int h0, int n);
    int h, v;
    h = h0; v = v0;
    for (int i = 0; i < n; i++) begin
      hcount = 11'(h); vcount = 10'(v);
      #1;
      if (i > 8) begin
        int xs, vs;
        xs = h + 4; vs = v;
        if (xs >= H_TOTAL) begin xs -= H_TOTAL; vs = (v == V_TOTAL - 1) ? 0 : v + 1; end
        // The pixel presented during this clock's hcount.
        `TB_CHECK(vr_pixel == pixel_at(vs, xs % 1024),
                  $sformatf("h=%0d v=%0d pixel %h expected %h", h, v, vr_pixel, pixel_at(vs, xs % 1024)))
      end
      @(posedge clk); #1;
      h = (h == H_TOTAL - 1) ? 0 : h + 1;
      if (h == 0) v = (v == V_TOTAL - 1) ? 0 : v + 1;
    end
  endtask

  initial begin
    rst = 1; hcount = 0; vcount = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run_from(10, 0, 3000);
    run_from(805, 1300, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
