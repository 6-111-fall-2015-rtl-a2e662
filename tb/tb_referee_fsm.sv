// tb_referee_fsm: drives the referee state machine through every state and
// exit it has, with the timeouts shortened (end-of-play 20 clocks, play
// timeout 30 clocks): line adjustment (one step per press however long it is
// held), score entry, a full shot that clears the low line and lands, a shot
// that never comes down (timeout in high), one that falls back and times out
// in low_after, one that lands without clearing the line, replay, and the
// game-over rule (7 points and 2 ahead), which only reset leaves. The lengths
// of end-of-play and of both timeouts are counted in clocks.
`include "tb/tb_util.svh"
module tb_referee_fsm;
  import snappa_pkg::*;
  localparam int P2E = 20, TO = 30;
  logic clk = 0, reset, up, down, throw_start, point_enter, point_toggle, replay_start, line_toggle;
  logic [10:0] y_center;
  logic [9:0] threshold_height, table_height;
  ref_state_e state;
  logic record, point;
  logic [3:0] player_1_score, player_2_score;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  referee_fsm #(.POINT_TO_END(P2E), .TIME_OUT(TO)) dut (
    .clk, .reset, .up, .down, .throw_start, .point_enter, .point_toggle, .replay_start,
    .line_toggle, .y_center, .threshold_height, .table_height, .state, .record, .point,
    .player_1_score, .player_2_score);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic press(ref logic sig, input int hold = 4);
    sig = 1; tick(hold); sig = 0; tick(2);
  endtask

  // Cycles until state leaves s (at most limit).
  task automatic cycles_in(input ref_state_e s, input int limit, output int n);
    n = 0;
    while (state == s && n < limit) begin tick(); n++; end
  endtask

  task automatic do_reset();
    reset = 1; tick(2); reset = 0; tick();
  endtask

  task automatic add_points(int p1, int p2);
    point_toggle = 0; repeat (p1) press(point_enter);
    point_toggle = 1; repeat (p2) press(point_enter);
    point_toggle = 0;
  endtask

  initial begin
    int n;
    {up, down, throw_start, point_enter, point_toggle, replay_start, line_toggle} = '0;
    y_center = 600;
    do_reset();
    `TB_CHECK(state == ST_IDLE && threshold_height == 75 && table_height == 400 &&
              player_1_score == 0 && player_2_score == 0 && !record, "reset values")

    // Line adjustment.
    press(up, 10);
    `TB_CHECK(threshold_height == 70, $sformatf("low line up: %0d", threshold_height))
    press(down); press(down);
    `TB_CHECK(threshold_height == 80, $sformatf("low line down twice: %0d", threshold_height))
    line_toggle = 1;
    press(up);
    `TB_CHECK(table_height == 395 && threshold_height == 80, "table line up")
    press(down); press(down);
    `TB_CHECK(table_height == 405, $sformatf("table line down: %0d", table_height))
    press(up); line_toggle = 0; press(up);
    `TB_CHECK(table_height == 400 && threshold_height == 75, "lines back to start")

    // Scores.
    add_points(3, 2);
    `TB_CHECK(player_1_score == 3 && player_2_score == 2, "score entry")

    // Full shot: up past the low line (315), back down (335), onto the table (660).
    throw_start = 1; tick(); throw_start = 0; tick();
    `TB_CHECK(state == ST_LOW_BEFORE && record && !point, "shot starts recording")
    y_center = 400; tick(3);
    `TB_CHECK(state == ST_LOW_BEFORE, "still below the low line")
    y_center = 300; tick(2);
    `TB_CHECK(state == ST_HIGH && point, "ball above the low line")
    y_center = 340; tick(2);
    `TB_CHECK(state == ST_LOW_AFTER, "ball back below the low line")
    y_center = 670; tick(2);
    `TB_CHECK(state == ST_END_PLAY && record, "ball reached the table")
    cycles_in(ST_END_PLAY, 100, n);
    `TB_CHECK(state == ST_IDLE && !record && point, "back to idle, point kept")
    `TB_CHECK(n >= P2E && n <= P2E + 2, $sformatf("end of play lasted %0d clocks", n))

    // Too high: never comes back down.
    y_center = 600;
    press(throw_start, 1);
    y_center = 200; tick(2);
    `TB_CHECK(state == ST_HIGH, "second shot high")
    cycles_in(ST_HIGH, 200, n);
    `TB_CHECK(state == ST_END_PLAY, "timeout ends a shot that stays high")
    `TB_CHECK(n >= TO && n <= TO + 2, $sformatf("high timeout after %0d clocks", n))
    cycles_in(ST_END_PLAY, 100, n);

    // Falls back below the line but never reaches the table.
    y_center = 600;
    press(throw_start, 1);
    y_center = 200; tick(2); y_center = 500; tick(2);
    `TB_CHECK(state == ST_LOW_AFTER, "third shot falling")
    cycles_in(ST_LOW_AFTER, 200, n);
    `TB_CHECK(state == ST_END_PLAY && n >= TO && n <= TO + 2, $sformatf("low_after timeout after %0d", n))
    cycles_in(ST_END_PLAY, 100, n);

    // Low shot: lands without clearing the line.
    y_center = 600;
    press(throw_start, 1);
    y_center = 700; tick(2);
    `TB_CHECK(state == ST_END_PLAY && !point, "low shot goes straight to end of play, no point")
    cycles_in(ST_END_PLAY, 100, n);

    // Replay.
    replay_start = 1; tick(2);
    `TB_CHECK(state == ST_REPLAY, "replay entered")
    press(throw_start);
    `TB_CHECK(state == ST_REPLAY && !record, "throw ignored during replay")
    replay_start = 0; tick(2);
    `TB_CHECK(state == ST_IDLE, "replay left")

    // Win by two.
    do_reset();
    add_points(6, 6);
    add_points(1, 0);
    `TB_CHECK(state == ST_IDLE, "7-6 is not a win")
    add_points(0, 1); add_points(1, 0);
    `TB_CHECK(state == ST_IDLE, "8-7 is not a win")
    add_points(1, 0);
    `TB_CHECK(state == ST_GAME_OVER && player_1_score == 9, "9-7 ends the game")
    press(throw_start); add_points(0, 1); replay_start = 1; tick(3); replay_start = 0;
    `TB_CHECK(state == ST_GAME_OVER && player_2_score == 7, "game over ignores inputs")
    do_reset();
    add_points(0, 7);
    `TB_CHECK(state == ST_GAME_OVER && player_2_score == 7, "7-0 for player 2 ends the game")
    do_reset();
    `TB_CHECK(state == ST_IDLE && player_2_score == 0, "reset leaves game over")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
