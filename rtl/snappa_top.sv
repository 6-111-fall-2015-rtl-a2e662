// snappa_top: the Snappa referee, a camera-based judge for a table game in
// which a thrown ball must rise above an agreed "low line" before it lands.
//
// Data flow. Decoded camera samples (YCrCb, with field/vertical/horizontal
// flags and a data-valid strobe, on the camera clock vclk) are converted to
// RGB and written two pixels per word into an external frame buffer. The
// 1024x768 XGA raster (65 MHz clk) reads the frame buffer back, converts each
// pixel to hue/saturation/value and lets the hue detector mark pixels of the
// tracked colour inside a window around the last ball position. The center of
// mass of the marked pixels, once per frame, is the ball position. The referee
// state machine compares its height with the low line and the table line,
// records the track of a shot into the shot memory and replays it on request.
// Sprites draw the ball marker, both lines, a check mark or X for the last
// shot, the scoreboard and, when a team has won, the game-over banner.
//
// Frame buffer bus: vram_addr/vram_we/vram_write_data go to the memory and
// vram_read_data must return the word addressed two clocks earlier. Odd
// hcount clocks carry camera writes (switch[7] low) and even clocks carry
// display reads; with switch[7] high the blanking intervals instead fill the
// buffer with a pattern of blue bars.
// Controls: button1 starts a shot, button0 adds a point (switch[4] picks the
// player), button_up/button_down move a line (switch[6] picks which),
// button3 releases the tracking window, button_right toggles half-speed
// replay, switch[5] replays, switch[1:0] picks the colour, switch[2] shows
// the detection colours. Buttons are debounced here; switches are used as is.
// Timing: the display output lags the raster by the HSV latency plus three
// clocks; hsync, vsync and blank are delayed to match.
// The block structure, wiring and controls follow the document. The vclk-side
// alignment of the flags with the RGB pipeline, a pending flag so that each
// camera word is written exactly once, and the delay length equal to the
// HSV pipeline latency are this design's choices.
// Left unused on purpose: switch[3] (spare), the two low bits of each camera
// colour (the frame buffer stores 6 bits per colour) and the replay address
// (only the replayed center is needed).
module snappa_top
  import snappa_pkg::*;
#(
  parameter int unsigned DEBOUNCE_DELAY  = 650_000,
  parameter int unsigned POINT_TO_END    = 100_000_000,
  parameter int unsigned TIME_OUT        = 300_000_000,
  parameter int unsigned DISP_PERIOD     = 27_000_000,
  parameter int          HSV_DIV_LATENCY = 18,
  parameter int          COM_DIV_LATENCY = 34,
  parameter int          REPLAY_LOGSIZE  = 9
) (
  input  logic        clk,            // 65 MHz pixel clock
  input  logic        reset,          // synchronous, active high
  // decoded camera stream
  input  logic        vclk,
  input  logic [29:0] ycrcb,          // {Y, Cr, Cb}, 10 bits each
  input  logic [2:0]  fvh,
  input  logic        dv,
  // frame buffer
  output logic [18:0] vram_addr,
  output logic        vram_we,
  output logic [35:0] vram_write_data,
  input  logic [35:0] vram_read_data,
  // user inputs
  input  logic        button0,
  input  logic        button1,
  input  logic        button3,
  input  logic        button_up,
  input  logic        button_down,
  input  logic        button_right,
  input  logic [7:0]  switch,
  // display
  output logic [7:0]  vga_red,
  output logic [7:0]  vga_green,
  output logic [7:0]  vga_blue,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic        vga_blank,
  // status
  output logic [7:0]  led,
  output logic [63:0] dispdata,
  output logic [2:0]  state,
  output logic        record,
  output logic        point,
  output logic [3:0]  player_1_score,
  output logic [3:0]  player_2_score,
  output logic [9:0]  threshold_height,
  output logic [9:0]  table_height,
  output logic [12:0] x_center,
  output logic [11:0] y_center,
  output logic [23:0] matches_in_frame,
  output logic        center_done
);

  localparam int HSV_LATENCY = HSV_DIV_LATENCY + 5;

  // ---------------- buttons ----------------
  logic b0_clean, b1_clean, b3_clean, up_clean, down_clean, right_clean;

  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db0 (.clk, .rst(reset), .noisy(button0),      .clean(b0_clean));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db1 (.clk, .rst(reset), .noisy(button1),      .clean(b1_clean));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db3 (.clk, .rst(reset), .noisy(button3),      .clean(b3_clean));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_dbu (.clk, .rst(reset), .noisy(button_up),    .clean(up_clean));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_dbd (.clk, .rst(reset), .noisy(button_down),  .clean(down_clean));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_dbr (.clk, .rst(reset), .noisy(button_right), .clean(right_clean));

  // ---------------- raster ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga u_xvga (.clk, .rst(reset), .hcount, .vcount, .hsync, .vsync, .blank);

  // ---------------- camera to frame buffer ----------------
  logic       vrst_m, vrst;
  logic [7:0] cam_r, cam_g, cam_b;
  logic [3:0] flags_d;           // {fvh, dv} aligned with the RGB pipeline

  always_ff @(posedge vclk) {vrst, vrst_m} <= {vrst_m, reset};

  ycrcb2rgb u_ycrcb2rgb (
    .clk(vclk), .rst(vrst), .y(ycrcb[29:20]), .cr(ycrcb[19:10]), .cb(ycrcb[9:0]),
    .r(cam_r), .g(cam_g), .b(cam_b));

  delay_line #(.WIDTH(4), .DEPTH(3)) u_flag_delay (
    .clk(vclk), .din({fvh, dv}), .dout(flags_d));

  logic [18:0] ntsc_addr;
  logic [35:0] ntsc_data;
  logic        ntsc_we;

  ntsc_to_zbt #(.XOFFSET(CAM_X0), .YOFFSET(CAM_Y0 / 2)) u_ntsc_to_zbt (
    .clk, .vclk, .rst(reset), .fvh(flags_d[3:1]), .dv(flags_d[0]),
    .din({cam_r[7:2], cam_g[7:2], cam_b[7:2]}),
    .ntsc_addr, .ntsc_data, .ntsc_we);

  // Frame buffer arbitration.
  logic [31:0] pat_count;
  logic        ntsc_pending;
  logic [18:0] pend_addr;
  logic [35:0] pend_data;
  logic        sw_ntsc, write_slot;
  pixel_t      bar_pixel;
  logic [18:0] read_addr;

  assign sw_ntsc   = !switch[7];
  assign bar_pixel = {6'h00, pat_count[7:4], 2'b00, 6'h3f};
  assign write_slot = sw_ntsc ? (hcount[0] && ntsc_pending) : blank;

  always_ff @(posedge clk) begin
    if (reset) begin
      pat_count    <= '0;
      ntsc_pending <= 1'b0;
      pend_addr    <= '0;
      pend_data    <= '0;
    end else begin
      pat_count <= pat_count + 32'd1;
      if (ntsc_we) begin
        ntsc_pending <= 1'b1;
        pend_addr    <= ntsc_addr;
        pend_data    <= ntsc_data;
      end else if (sw_ntsc && hcount[0]) begin
        ntsc_pending <= 1'b0;
      end
    end
  end

  always_comb begin
    vram_we         = write_slot;
    vram_addr       = write_slot ? (sw_ntsc ? pend_addr : pat_count[18:0]) : read_addr;
    vram_write_data = sw_ntsc ? pend_data : {bar_pixel, bar_pixel};
  end

  // ---------------- frame buffer to HSV ----------------
  pixel_t      vr_pixel;
  logic [7:0]  hue, sat, val;

  vram_display u_vram_display (
    .clk, .rst(reset), .hcount, .vcount, .vr_pixel,
    .vram_addr(read_addr), .vram_read_data);

  rgb2hsv #(.DIV_LATENCY(HSV_DIV_LATENCY)) u_rgb2hsv (
    .clk, .rst(reset),
    .r({vr_pixel[17:12], 2'b00}), .g({vr_pixel[11:6], 2'b00}), .b({vr_pixel[5:0], 2'b00}),
    .h(hue), .s(sat), .v(val));

  // Hold raster position, pixel and sync back by the HSV latency.
  logic [10:0] hc_hsv, hc_det;
  logic [9:0]  vc_hsv, vc_det;
  pixel_t      pix_hsv;
  logic [2:0]  sync_det;

  delay_line #(.WIDTH(21), .DEPTH(HSV_LATENCY)) u_pos_delay (
    .clk, .din({hcount, vcount}), .dout({hc_hsv, vc_hsv}));
  delay_line #(.WIDTH(18), .DEPTH(HSV_LATENCY)) u_pix_delay (
    .clk, .din(vr_pixel), .dout(pix_hsv));
  // The hue detector adds two more clocks.
  delay_line #(.WIDTH(21), .DEPTH(2)) u_pos_delay2 (
    .clk, .din({hc_hsv, vc_hsv}), .dout({hc_det, vc_det}));
  delay_line #(.WIDTH(3), .DEPTH(HSV_LATENCY + 2)) u_sync_delay (
    .clk, .din({blank, hsync, vsync}), .dout(sync_det));

  // ---------------- tracking ----------------
  logic [10:0] x_center_test;
  logic [9:0]  y_center_test;
  logic [31:0] middle_hsv;
  pixel_t      hue_pixel;
  logic        match;

  always_ff @(posedge clk) begin
    x_center_test <= b3_clean ? '0 : x_center[10:0];
    y_center_test <= b3_clean ? '0 : y_center[9:0];
    if (hc_hsv == 11'd500 && vc_hsv == 10'd500)
      middle_hsv <= {hue, 4'b0, sat, 4'b0, val};
  end

  hue_detector u_hue_detector (
    .clk, .h(hue), .s(sat), .v(val), .color(switch[1:0]), .background(switch[2]),
    .rgb(pix_hsv), .hcount(hc_hsv), .vcount(vc_hsv),
    .x_center(x_center_test), .y_center(y_center_test),
    .test_rgb(hue_pixel), .match);

  center_of_mass #(.DIV_LATENCY(COM_DIV_LATENCY)) u_center_of_mass (
    .clk, .rst(reset), .smooth(1'b0), .match, .hcount(hc_det), .vcount(vc_det),
    .x_center, .y_center, .final_count(matches_in_frame), .done(center_done));

  // ---------------- referee ----------------
  ref_state_e fsm_state;

  referee_fsm #(.YOFFSET(CAM_Y0), .POINT_TO_END(POINT_TO_END), .TIME_OUT(TIME_OUT)) u_referee_fsm (
    .clk, .reset, .up(up_clean), .down(down_clean), .throw_start(b1_clean),
    .point_enter(b0_clean), .point_toggle(switch[4]), .replay_start(switch[5]),
    .line_toggle(switch[6]), .y_center(y_center[10:0]),
    .threshold_height, .table_height, .state(fsm_state), .record, .point,
    .player_1_score, .player_2_score);

  assign state = fsm_state;

  // ---------------- shot memory ----------------
  logic [24:0]               replay_center;
  logic                      replay_slow;

  shot_memory #(.LOGSIZE(REPLAY_LOGSIZE), .WIDTH(25)) u_shot_memory (
    .clk, .rst(reset), .frame_tick(center_done), .record, .replay(switch[5]),
    .slow_toggle(right_clean), .din({x_center, y_center}),
    .dout(replay_center), .addr(), .slow(replay_slow));

  logic [12:0] x_disp;
  logic [11:0] y_disp;
  assign x_disp = switch[5] ? replay_center[24:12] : x_center;
  assign y_disp = switch[5] ? replay_center[11:0]  : y_center;

  // ---------------- overlay graphics ----------------
  pixel_t ball_pixel, low_pixel, table_pixel, marker_pixel, score_pixel, word_pixel;

  ball_marker u_ball (
    .x_center(x_disp), .y_center(y_disp), .hcount(hc_det), .vcount(vc_det),
    .replay(switch[5]), .background(hue_pixel), .pixel(ball_pixel));

  line_sprite u_low_line (
    .height(threshold_height), .is_low(1'b1), .hcount(hc_det), .vcount(vc_det),
    .background(ball_pixel), .pixel(low_pixel));

  line_sprite u_table_line (
    .height(table_height), .is_low(1'b0), .hcount(hc_det), .vcount(vc_det),
    .background(low_pixel), .pixel(table_pixel));

  low_indicator u_low_marker (
    .point, .x_start(11'd30), .y_start(10'd30), .hcount(hc_det), .vcount(vc_det),
    .background(table_pixel), .pixel(marker_pixel));

  scoreboard u_scoreboard (
    .left_score(player_2_score), .right_score(player_1_score),
    .hcount(hc_det), .vcount(vc_det), .background(marker_pixel), .pixel(score_pixel));

  logic game_over;
  assign game_over = (fsm_state == ST_GAME_OVER);

  game_over_text u_game_over (
    .hcount(hc_det), .vcount(vc_det), .game_over,
    .red_wins(player_2_score > player_1_score),
    .background(score_pixel), .pixel(word_pixel));

  // ---------------- output ----------------
  pixel_t out_pixel;

  always_ff @(posedge clk) begin
    out_pixel <= word_pixel;
    {vga_blank, vga_hsync, vga_vsync} <= sync_det;
  end

  assign vga_red   = {out_pixel[17:12], 2'b00};
  assign vga_green = {out_pixel[11:6],  2'b00};
  assign vga_blue  = {out_pixel[5:0],   2'b00};

  // ---------------- status ----------------
  logic [31:0] disp_count;

  assign led = ~{fsm_state, 2'b00, b3_clean, replay_slow, reset};

  always_ff @(posedge clk) begin
    if (reset) begin
      disp_count <= '0;
      dispdata   <= '0;
    end else if (disp_count == DISP_PERIOD) begin
      disp_count <= '0;
      dispdata   <= {middle_hsv, 29'b0, fsm_state};
    end else begin
      disp_count <= disp_count + 32'd1;
    end
  end

endmodule
