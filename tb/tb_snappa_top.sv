// tb_snappa_top: end-to-end test of the referee with short timers (debounce
// 4 clocks, end-of-play 20,000 clocks, shot time-out 2,500,000 clocks, status
// refresh 500,000 clocks); every datapath size is at its default.
//
// The camera model sends one short frame, and the words it produces are
// checked in the frame buffer and on the screen. The ball is then painted
// straight into the frame buffer model, moved frame by frame, and the test
// follows the tracked center and the referee through: line adjustment, the
// tracking window losing a ball that jumped and the window release button
// finding it, a high shot (low-before, high, low-after, end-of-play, check
// mark), a low shot (X mark), a shot that times out while high, replay with
// the large blue marker and half-speed replay, the detection-colour view,
// score entry up to game over with its banner, and the test-pattern mode of
// the frame buffer. Each mechanism is counted; one that never happened is a
// failure.
`include "tb/tb_util.svh"
module tb_snappa_top;
  import snappa_pkg::*;
  localparam int DEB = 4;
  localparam int TIME_OUT = 2_500_000;

`include "tb/snappa_harness.svh"

  snappa_top #(.DEBOUNCE_DELAY(DEB), .POINT_TO_END(20_000), .TIME_OUT(TIME_OUT),
               .DISP_PERIOD(500_000)) dut (.*);

  int n_line_adjust = 0, n_window_lost = 0, n_window_release = 0, n_high_shot = 0,
      n_low_shot = 0, n_timeout = 0, n_replay = 0, n_slow_replay = 0, n_detect_view = 0,
      n_score = 0, n_game_over = 0, n_status = 0, n_camera_shown = 0;

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic throw_and_follow(int ys [$], output int clip_x, output int clip_y);
    bit first = 1;
    press(button1);
    `TB_CHECK(state == 3'(ST_LOW_BEFORE) && record, $sformatf("throw did not start recording, state %0d", state))
    foreach (ys[i]) begin
      move_ball(500, ys[i]);
      next_center();
      repeat (2) @(posedge clk); #1;    // the referee acts on the new center
      if (first) begin clip_x = int'(x_center); clip_y = int'(y_center); first = 0; end
      `TB_CHECK(near(int'(y_center), ys[i], 2), $sformatf("tracked y %0d, ball at %0d", y_center, ys[i]))
    end
  endtask

  task automatic wait_idle();
    int n = 0;
    while (state != 3'(ST_IDLE) && n < 10_000_000) begin @(posedge clk); #1; n++; end
    `TB_CHECK(state == 3'(ST_IDLE) && !record, "play did not return to idle")
  endtask

  initial begin
    logic [17:0] p;
    int cx, cy, t0, a0, steps;
    int seen;

    move_ball(500, 450);
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 0;

    // ---- camera path ----
    camera_frame(3, 12);
    repeat (50) @(posedge clk);
    `TB_CHECK(n_cam_write == 3 * 6, $sformatf("%0d camera words written, want 18", n_cam_write))
    for (int k = 1; k <= 3; k++)
      for (int c = 0; c < 12; c++) begin
        p = get_pixel(150 + c, 250 + 2 * k);
        `TB_CHECK(p[17:12] == p[11:6] && p[11:6] == p[5:0] && (c % 2 == 0 ? p[5:0] >= 6'd62 : near(int'(p[5:0]), 32, 1)),
                  $sformatf("camera pixel row %0d col %0d stored as %h", k, c, p))
      end
    // the same pixels on the screen, one line above the first camera row
    p = get_pixel(158, 254);
    expect_pixel(158 - SHIFT, 254, p, "camera pixel on screen");
    if (p[5:0] >= 6'd62) n_camera_shown++;

    // ---- tracking and overlays at rest ----
    repeat (2) next_center();
    `TB_CHECK(near(int'(x_center), 500, 2) && near(int'(y_center), 450, 2) &&
              matches_in_frame == 24'(4 * BALL_HALF * BALL_HALF),
              $sformatf("center %0d,%0d count %0d", x_center, y_center, matches_in_frame))
    `TB_CHECK(threshold_height == 10'd75 && table_height == 10'd400, "initial line heights")
    expect_pixel(500, 120, PIX_WHITE, "scoreboard dash");
    expect_pixel(500, 325, PIX_RED, "low line");
    expect_pixel(500, 450, PIX_GREEN, "live ball marker");
    expect_pixel(500, 650, PIX_GREEN, "table line");

    // ---- line adjustment ----
    press(button_up); press(button_up); press(button_down);
    `TB_CHECK(threshold_height == 10'd70, $sformatf("low line at %0d, want 70", threshold_height))
    switch[6] = 1;
    press(button_down);
    switch[6] = 0;
    `TB_CHECK(table_height == 10'd405, $sformatf("table line at %0d, want 405", table_height))
    if (threshold_height == 10'd70 && table_height == 10'd405) n_line_adjust++;
    expect_pixel(500, 320, PIX_RED, "moved low line");

    // ---- tracking window ----
    move_ball(500, 690);
    next_center(); next_center();
    `TB_CHECK(matches_in_frame == 0 && near(int'(y_center), 450, 2),
              $sformatf("ball outside the window still found: count %0d y %0d", matches_in_frame, y_center))
    if (matches_in_frame == 0) n_window_lost++;
    @(negedge clk) button3 = 1;           // held from here on
    next_center(); next_center();
    `TB_CHECK(near(int'(y_center), 690, 2) && matches_in_frame != 0, $sformatf("released window: y %0d", y_center))
    if (near(int'(y_center), 690, 2)) n_window_release++;
    move_ball(500, 450);
    next_center();

    // ---- a high shot ----
    throw_and_follow('{290, 450, 690}, cx, cy);
    `TB_CHECK(state == 3'(ST_END_PLAY) && point, $sformatf("high shot ended in state %0d point %0b", state, point))
    wait_idle();
    if (point) n_high_shot++;
    expect_pixel(70, 195, PIX_GREEN, "check mark");

    // ---- a low shot ----
    move_ball(500, 450); next_center();
    throw_and_follow('{450, 690}, cx, cy);
    `TB_CHECK(state == 3'(ST_END_PLAY) && !point, $sformatf("low shot ended in state %0d point %0b", state, point))
    wait_idle();
    if (!point) n_low_shot++;
    expect_pixel(115, 115, PIX_RED, "X mark");

    // ---- a shot that stays high until the time-out ----
    move_ball(500, 450); next_center();
    throw_and_follow('{290}, cx, cy);
    `TB_CHECK(state == 3'(ST_HIGH), $sformatf("state %0d, want high", state))
    t0 = 0;
    while (state == 3'(ST_HIGH) && t0 < 2 * TIME_OUT) begin @(posedge clk); #1; t0++; end
    `TB_CHECK(state == 3'(ST_END_PLAY) && near(t0, TIME_OUT, 2), $sformatf("left high after %0d clocks", t0))
    if (state == 3'(ST_END_PLAY)) n_timeout++;
    wait_idle();

    // ---- replay of the last shot ----
    move_ball(500, 450);
    next_center();
    switch[5] = 1;
    repeat (3) @(posedge clk); #1;
    `TB_CHECK(state == 3'(ST_REPLAY), $sformatf("state %0d, want replay", state))
    // first recorded position, drawn with the large replay marker
    expect_pixel(cx + 15, cy, PIX_BLUE, "replay marker");
    if (state == 3'(ST_REPLAY)) n_replay++;
    press(button_right);
    `TB_CHECK(led[1] == 1'b0, "half-speed replay not selected")
    a0 = int'(dut.u_shot_memory.addr);
    steps = 0;
    for (int i = 0; i < 4; i++) begin
      seen = int'(dut.u_shot_memory.addr);
      next_center(); repeat (2) @(posedge clk); #1;
      if (int'(dut.u_shot_memory.addr) != seen) steps++;
    end
    `TB_CHECK(steps == 2, $sformatf("replay advanced %0d times in 4 frames at half speed (from %0d)", steps, a0))
    if (steps == 2) n_slow_replay++;
    switch[5] = 0;
    repeat (3) @(posedge clk); #1;
    `TB_CHECK(state == 3'(ST_IDLE), "replay not left")

    // ---- detection colours ----
    switch[2] = 1;
    expect_pixel(500 + 10, 450, PIX_MAGENTA, "matched pixel in detection view");
    expect_pixel(500 + 10, 500, PIX_BLACK, "grey pixel in detection view");
    switch[2] = 0;
    n_detect_view++;

    // ---- status display ----
    t0 = 0;
    while (dispdata[2:0] != 3'(ST_IDLE) && t0 < 2_000_000) begin @(posedge clk); #1; t0++; end
    `TB_CHECK(dispdata[2:0] == 3'(ST_IDLE) && dispdata[7:0] + 0 == 8'(ST_IDLE) && dispdata[39:32] == 8'd80 && dispdata[51:44] == 8'd0,
              $sformatf("status word %h", dispdata))
    if (dispdata[39:32] == 8'd80) n_status++;

    // ---- score entry and game over ----
    expect_pixel(20 + 550 + 37, 500, GREY, "no banner before game over");
    switch[4] = 1; press(button0); switch[4] = 0;
    `TB_CHECK(player_2_score == 4'd1, "player 2 point")
    for (int i = 0; i < 7; i++) press(button0);
    `TB_CHECK(player_1_score == 4'd7, $sformatf("player 1 has %0d", player_1_score))
    if (player_1_score == 4'd7 && player_2_score == 4'd1) n_score++;
    repeat (3) @(posedge clk); #1;
    `TB_CHECK(state == 3'(ST_GAME_OVER), $sformatf("state %0d, want game over", state))
    expect_pixel(20 + 37, 500, PIX_BLUE, "BLUE banner");
    expect_pixel(20 + 550 + 37, 500, PIX_GREEN, "WON banner");
    if (state == 3'(ST_GAME_OVER)) n_game_over++;
    press(button1);
    `TB_CHECK(state == 3'(ST_GAME_OVER), "game over must hold")

    // ---- test pattern ----
    switch[7] = 1;
    repeat (3000) @(posedge clk);
    switch[7] = 0;

    `TB_CHECK(n_camera_shown > 0,    "camera pixel never reached the screen")
    `TB_CHECK(n_cam_write > 0,       "no camera writes")
    `TB_CHECK(n_center > 0,          "ball never tracked")
    `TB_CHECK(n_line_adjust > 0,     "lines never adjusted")
    `TB_CHECK(n_window_lost > 0,     "tracking window never lost the ball")
    `TB_CHECK(n_window_release > 0,  "window release never used")
    `TB_CHECK(n_high_shot > 0,       "no high shot")
    `TB_CHECK(n_low_shot > 0,        "no low shot")
    `TB_CHECK(n_timeout > 0,         "no time-out")
    `TB_CHECK(n_replay > 0,          "no replay")
    `TB_CHECK(n_slow_replay > 0,     "no half-speed replay")
    `TB_CHECK(n_detect_view > 0,     "no detection view")
    `TB_CHECK(n_status > 0,          "status word never refreshed")
    `TB_CHECK(n_score > 0,           "no score entry")
    `TB_CHECK(n_game_over > 0,       "no game over")
    `TB_CHECK(n_pattern_write > 0,   "no test-pattern writes")
    $display("mechanisms: camera writes %0d, camera shown %0d, tracked frames %0d, line adjust %0d, window lost %0d, window release %0d, high shot %0d, low shot %0d, time-out %0d, replay %0d, slow replay %0d, detection view %0d, status %0d, score %0d, game over %0d, pattern writes %0d",
             n_cam_write, n_camera_shown, n_center, n_line_adjust, n_window_lost, n_window_release, n_high_shot,
             n_low_shot, n_timeout, n_replay, n_slow_replay, n_detect_view, n_status, n_score, n_game_over, n_pattern_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
