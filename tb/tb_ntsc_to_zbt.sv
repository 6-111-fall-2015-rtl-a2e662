// tb_ntsc_to_zbt: feeds two camera frames (field 0 and field 1 each) of a small
// synthetic picture on a 27 MHz camera clock and checks every frame-buffer
// write on the 65 MHz system clock. The pixel at camera line i (row i+1) and
// column c is a function of both; each write must carry the even/odd pixel
// pair its address names, only field-0 lines may be written, the field flag in
// the address must alternate between frames, and every pair must be written
// exactly once per frame.
`include "tb/tb_util.svh"
module tb_ntsc_to_zbt;
  localparam int LINES = 6, PIXELS = 20, VBLANK_LINES = 2;
  logic clk = 0, vclk = 0, rst;
  logic [2:0] fvh;
  logic dv;
  logic [17:0] din;
  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  logic ntsc_we;
  int checks = 0, failures = 0;
  int writes = 0, frame_writes [2];
  int eo_seen [2];

  always #7.692 clk = ~clk;     // 65 MHz
  always #18.518 vclk = ~vclk;  // 27 MHz

  ntsc_to_zbt dut (.clk, .vclk, .rst, .fvh, .dv, .din, .ntsc_addr, .ntsc_data, .ntsc_we);

  function automatic logic [17:0] pix(int row, int col);
    return 18'((row * 1000 + col * 7 + 5) & 18'h3ffff);
  endfunction

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write monitor.
  int cur_frame = 0;
  always @(posedge clk) if (ntsc_we) begin
    int y_addr, eo, xpair, row, col;
    y_addr = ntsc_addr[18:10];
    eo     = ntsc_addr[9];
    xpair  = ntsc_addr[8:0];
    row    = y_addr - 125;
    col    = xpair * 2 - 150;
    writes++;
    frame_writes[cur_frame]++;
    eo_seen[cur_frame] = eo;
    `TB_CHECK(row >= 1 && row <= LINES && col >= 0 && col + 1 < PIXELS,
              $sformatf("write outside picture row %0d col %0d", row, col))
    `TB_CHECK(ntsc_data == {pix(row, col), pix(row, col + 1)},
              $sformatf("data %h at row %0d col %0d", ntsc_data, row, col))
  end

  task automatic send_field(input bit field);
    for (int l = 0; l < VBLANK_LINES + LINES; l++) begin
      bit vb;
      vb = l < VBLANK_LINES;
      // horizontal sync pulse
      @(posedge vclk); fvh <= {field, vb, 1'b1}; dv <= 0;
      @(posedge vclk); fvh <= {field, vb, 1'b0};
      repeat (3) @(posedge vclk);
      if (!vb) begin
        for (int c = 0; c < PIXELS; c++) begin
          @(posedge vclk); dv <= 1; din <= pix(l - VBLANK_LINES + 1, c);
          @(posedge vclk); dv <= 0;
        end
      end
      repeat (6) @(posedge vclk);
    end
  endtask

  initial begin
    rst = 1; fvh = 3'b010; dv = 0; din = 0;
    repeat (10) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge vclk);
    for (int f = 0; f < 2; f++) begin
      cur_frame = f;
      send_field(1'b0);
      send_field(1'b1);
      repeat (20) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    `TB_CHECK(frame_writes[0] == LINES * PIXELS / 2, $sformatf("frame 0 writes %0d", frame_writes[0]))
    `TB_CHECK(frame_writes[1] == LINES * PIXELS / 2, $sformatf("frame 1 writes %0d", frame_writes[1]))
    `TB_CHECK(eo_seen[0] != eo_seen[1], "field flag alternates between frames")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
