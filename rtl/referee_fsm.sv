// referee_fsm: the game logic of the referee.
//
// States (numbering on the state output): idle 1, replay 2, three recording
// states 3..5 that follow the ball, end-of-play 6 and game-over 7.
//  idle      Buttons move the low (threshold) line or the table line by STEP
//            lines (line_toggle picks which, up moves it up the screen) and
//            add a point to player 1 or player 2 (point_toggle picks which).
//            Each press acts once. When a score is at least WIN_SCORE and at
//            least WIN_MARGIN ahead the game is over. Otherwise replay_start
//            enters replay and throw_start starts recording a shot.
//  replay    Held while replay_start is high.
//  low_before Ball not yet above the low line. Rising above it (y_center
//            smaller than the line minus BUFFER) sets point and goes to high;
//            falling below the table line (plus BUFFER) goes to end-of-play.
//  high      Ball above the low line; falling back below it (plus BUFFER)
//            goes to low_after; TIME_OUT clocks without that end the play.
//  low_after Ball below the low line; reaching the table, or TIME_OUT clocks,
//            ends the play.
//  end_play  Keeps recording for POINT_TO_END clocks, then clears record and
//            returns to idle.
//  game_over Left only by reset.
// Heights are in lines below the top of the camera image; y_center is in
// raster lines, so comparisons add YOFFSET. record is high from throw_start
// until the end of end_play; point tells whether the last shot was high
// enough. All state changes happen on the clock; reset is synchronous.
// States, thresholds, initial line heights, step and timeouts are the
// document's; giving game-over precedence over a replay or a throw requested
// on the same clock is this design's choice.
module referee_fsm
  import snappa_pkg::*;
#(
  parameter int          BUFFER       = 10,
  parameter int          YOFFSET      = 250,
  parameter int          STEP         = 5,
  parameter logic [9:0]  THRESH_INIT  = 10'd75,
  parameter logic [9:0]  TABLE_INIT   = 10'd400,
  parameter int unsigned POINT_TO_END = 100_000_000,
  parameter int unsigned TIME_OUT     = 300_000_000,
  parameter int          WIN_SCORE    = 7,
  parameter int          WIN_MARGIN   = 2
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        up,
  input  logic        down,
  input  logic        throw_start,
  input  logic        point_enter,
  input  logic        point_toggle,
  input  logic        replay_start,
  input  logic        line_toggle,
  input  logic [10:0] y_center,
  output logic [9:0]  threshold_height,
  output logic [9:0]  table_height,
  output ref_state_e  state,
  output logic        record,
  output logic        point,
  output logic [3:0]  player_1_score,
  output logic [3:0]  player_2_score
);

  logic        line_armed, point_armed;   // re-armed when the buttons are released
  logic [31:0] play_count, end_count;

  // Ball position compared with the lines, in raster lines.
  logic [11:0] y, thr_hi, thr_lo, tbl_lo;
  assign y      = 12'(y_center);
  assign thr_hi = 12'(threshold_height) + 12'(YOFFSET) - 12'(BUFFER);
  assign thr_lo = 12'(threshold_height) + 12'(YOFFSET) + 12'(BUFFER);
  assign tbl_lo = 12'(table_height)     + 12'(YOFFSET) + 12'(BUFFER);

  logic p1_wins, p2_wins;
  assign p1_wins = 5'(player_1_score) >= 5'(WIN_SCORE) &&
                   5'(player_1_score) >= 5'(player_2_score) + 5'(WIN_MARGIN);
  assign p2_wins = 5'(player_2_score) >= 5'(WIN_SCORE) &&
                   5'(player_2_score) >= 5'(player_1_score) + 5'(WIN_MARGIN);

  always_ff @(posedge clk) begin
    if (reset) begin
      state            <= ST_IDLE;
      threshold_height <= THRESH_INIT;
      table_height     <= TABLE_INIT;
      player_1_score   <= '0;
      player_2_score   <= '0;
      record           <= 1'b0;
      point            <= 1'b0;
      line_armed       <= 1'b1;
      point_armed      <= 1'b1;
      play_count       <= '0;
      end_count        <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          play_count <= '0;
          end_count  <= '0;
          if (line_armed && (up || down)) begin
            line_armed <= 1'b0;
            if (!line_toggle)
              threshold_height <= up ? threshold_height - 10'(STEP)
                                     : threshold_height + 10'(STEP);
            else
              table_height <= up ? table_height - 10'(STEP)
                                 : table_height + 10'(STEP);
          end else if (!up && !down) begin
            line_armed <= 1'b1;
          end
          if (point_armed && point_enter) begin
            point_armed <= 1'b0;
            if (!point_toggle) player_1_score <= player_1_score + 4'd1;
            else               player_2_score <= player_2_score + 4'd1;
          end else if (!point_enter) begin
            point_armed <= 1'b1;
          end
          if (p1_wins || p2_wins) begin
            state <= ST_GAME_OVER;
          end else if (replay_start) begin
            state <= ST_REPLAY;
          end else if (throw_start) begin
            state  <= ST_LOW_BEFORE;
            record <= 1'b1;
            point  <= 1'b0;
          end
        end
        ST_REPLAY: if (!replay_start) state <= ST_IDLE;
        ST_LOW_BEFORE: begin
          if (y < thr_hi) begin
            state <= ST_HIGH;
            point <= 1'b1;
          end else if (y > tbl_lo) begin
            state <= ST_END_PLAY;
          end
        end
        ST_HIGH: begin
          play_count <= play_count + 32'd1;
          if (y > thr_lo) begin
            state      <= ST_LOW_AFTER;
            play_count <= '0;
          end else if (play_count == TIME_OUT) begin
            state <= ST_END_PLAY;
          end
        end
        ST_LOW_AFTER: begin
          play_count <= play_count + 32'd1;
          if (y > tbl_lo || play_count == TIME_OUT) state <= ST_END_PLAY;
        end
        ST_END_PLAY: begin
          if (end_count < POINT_TO_END) begin
            end_count <= end_count + 32'd1;
          end else begin
            state  <= ST_IDLE;
            record <= 1'b0;
          end
        end
        ST_GAME_OVER: ;
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
