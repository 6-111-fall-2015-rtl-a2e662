// Shared test harness for the Snappa referee top level, included inside the
// body of a testbench module. The including module declares the localparams
// DEB (debounce delay used by the instance) before the include and
// instantiates the top as `dut` after it.
//
// It provides: the 65 MHz-class pixel clock and the camera clock, a model of
// the external frame buffer (2^19 words of 36 bits, read data two clocks
// after the address, writes on the clock where vram_we is high), a camera
// model that sends a short interlaced frame of decoded samples, tasks that
// paint a ball straight into the frame buffer (as if the camera had seen it),
// press buttons, wait for tracking results and sample the video output at a
// given raster position.

  logic        clk = 0, vclk = 0, reset = 1;
  logic [29:0] ycrcb = '0;
  logic [2:0]  fvh = 3'b010;
  logic        dv = 0;
  logic [18:0] vram_addr;
  logic        vram_we;
  logic [35:0] vram_write_data, vram_read_data;
  logic        button0 = 0, button1 = 0, button3 = 0;
  logic        button_up = 0, button_down = 0, button_right = 0;
  logic [7:0]  switch = 8'h01;            // blue ball, camera mode
  logic [7:0]  vga_red, vga_green, vga_blue, led;
  logic        vga_hsync, vga_vsync, vga_blank;
  logic [63:0] dispdata;
  logic [2:0]  state;
  logic        record, point;
  logic [3:0]  player_1_score, player_2_score;
  logic [9:0]  threshold_height, table_height;
  logic [12:0] x_center;
  logic [11:0] y_center;
  logic [23:0] matches_in_frame;
  logic        center_done;

  int checks = 0, failures = 0;

  localparam logic [17:0] GREY = {6'd20, 6'd20, 6'd20};
  localparam logic [17:0] BALL = {6'd25, 6'd25, 6'd50};   // hue 170, S 127, V 200
  localparam int BALL_HALF = 15;
  // A stored pixel appears on the raster (and to the tracker) this many
  // pixels left of its column.
  localparam int SHIFT = 4;

  always #8  clk  = ~clk;
  always #19 vclk = ~vclk;

  // ---------------- frame buffer model ----------------
  logic [35:0] mem [1 << 19];
  logic [35:0] rd1;
  always_ff @(posedge clk) begin
    rd1            <= mem[vram_addr];
    vram_read_data <= rd1;
    if (vram_we) mem[vram_addr] <= vram_write_data;
  end

  function automatic void put_pixel(int h, int v, logic [17:0] p);
    logic [18:0] a;
    a = {10'(v), 9'(h >> 1)};
    if (h % 2 == 0) mem[a][35:18] = p;
    else            mem[a][17:0]  = p;
  endfunction

  function automatic logic [17:0] get_pixel(int h, int v);
    logic [35:0] w;
    w = mem[{10'(v), 9'(h >> 1)}];
    return (h % 2 == 0) ? w[35:18] : w[17:0];
  endfunction

  // Ball centred (as the tracker sees it) at x, y.
  function automatic void draw_ball(int x, int y, logic [17:0] p);
    for (int v = y - BALL_HALF; v < y + BALL_HALF; v++)
      for (int h = x - BALL_HALF; h < x + BALL_HALF; h++)
        put_pixel(h + SHIFT, v, p);
  endfunction

  int ball_x = 500, ball_y = 450;
  task automatic move_ball(int x, int y);
    draw_ball(ball_x, ball_y, GREY);
    ball_x = x; ball_y = y;
    draw_ball(ball_x, ball_y, BALL);
  endtask

  // ---------------- mechanism counters ----------------
  int n_cam_write = 0, n_pattern_write = 0, n_center = 0;

  always @(posedge clk) begin
    if (vram_we && !switch[7]) n_cam_write++;
    if (vram_we && switch[7]) begin
      n_pattern_write++;
      `TB_CHECK(vga_blank_raw() && vram_write_data[35:18] == {6'h00, vram_addr[7:4], 2'b00, 6'h3f}
                && vram_write_data[17:0] == vram_write_data[35:18],
                $sformatf("pattern write %h at %h outside blanking or wrong bars", vram_write_data, vram_addr))
    end
    if (center_done && matches_in_frame != 0) n_center++;
  end

  function automatic logic vga_blank_raw();
    return dut.blank;
  endfunction

  // ---------------- helpers ----------------
  // Waits for the next per-frame tracking result; values are read after it.
  task automatic next_center();
    do begin @(posedge clk); #1; end while (!center_done);
  endtask

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (DEB + 10) @(posedge clk);
    @(negedge clk) b = 0;
    repeat (DEB + 10) @(posedge clk);
  endtask

  // Raster position of the pixel currently on the video outputs.
  logic [10:0] out_h;
  logic [9:0]  out_v;
  always @(posedge clk) {out_h, out_v} <= {dut.hc_det, dut.vc_det};

  task automatic sample_pixel(int h, int v, output logic [17:0] p);
    do begin @(posedge clk); #1; end while (!(out_h == 11'(h) && out_v == 10'(v)));
    p = {vga_red[7:2], vga_green[7:2], vga_blue[7:2]};
  endtask

  task automatic expect_pixel(int h, int v, logic [17:0] want, string what);
    logic [17:0] p;
    sample_pixel(h, v, p);
    `TB_CHECK(p == want, $sformatf("%s: pixel at %0d,%0d is %h, want %h", what, h, v, p, want))
  endtask

  function automatic bit near(int a, int b, int tol);
    return a - b <= tol && b - a <= tol;
  endfunction

  // ---------------- camera model ----------------
  // One interlaced frame, shortened: each field has 2 vertical-blank lines
  // and `lines` active lines of `samples` pixels; every pixel is sent with a
  // data-valid pulse. Even columns are white, odd columns mid-grey.
  localparam logic [29:0] CAM_WHITE = {10'd940, 10'd512, 10'd512};
  localparam logic [29:0] CAM_GREY  = {10'd512, 10'd512, 10'd512};

  task automatic camera_line(bit f, bit v, int samples);
    @(negedge vclk) fvh = {f, v, 1'b1};
    repeat (4) @(negedge vclk);
    fvh = {f, v, 1'b0};
    repeat (2) @(negedge vclk);
    for (int c = 0; c < samples; c++) begin
      ycrcb = (c % 2 == 0) ? CAM_WHITE : CAM_GREY;
      dv = !v;
      @(negedge vclk) dv = 0;
      @(negedge vclk);
    end
  endtask

  task automatic camera_frame(int lines, int samples);
    for (int f = 0; f < 2; f++) begin
      repeat (2) camera_line(f[0], 1'b1, samples);
      repeat (lines) camera_line(f[0], 1'b0, samples);
    end
    @(negedge vclk) fvh = 3'b010;
  endtask

  initial begin
    for (int i = 0; i < (1 << 19); i++) mem[i] = {GREY, GREY};
  end
