// tb_snappa_top_full: the referee top level with every parameter at its
// default (10 ms debounce, 100,000,000-clock end-of-play), taken through one
// complete high shot: the camera writes a short frame into the frame buffer,
// the ball (painted into the frame buffer) is tracked, the throw button
// starts a shot, the ball rises above the low line, falls back and reaches
// the table, and the referee keeps recording for the end-of-play time before
// returning to idle with the shot judged high (green check mark). The time
// spent in end-of-play is checked against the default.
`include "tb/tb_util.svh"
module tb_snappa_top_full;
  import snappa_pkg::*;
  localparam int DEB = 650_000;
  localparam int POINT_TO_END = 100_000_000;

`include "tb/snappa_harness.svh"

  snappa_top dut (.*);

  initial begin
    #4s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ys [3] = '{290, 450, 690};
    int n;
    move_ball(500, 450);
    repeat (5) @(posedge clk);
    @(negedge clk) reset = 0;

    camera_frame(2, 8);
    repeat (50) @(posedge clk);
    `TB_CHECK(n_cam_write == 2 * 4, $sformatf("%0d camera words written, want 8", n_cam_write))

    repeat (2) next_center();
    `TB_CHECK(near(int'(x_center), 500, 2) && near(int'(y_center), 450, 2),
              $sformatf("center %0d,%0d", x_center, y_center))
    @(negedge clk) button3 = 1;          // whole-window tracking for the jumps below
    press(button1);
    `TB_CHECK(state == 3'(ST_LOW_BEFORE) && record, $sformatf("throw did not start, state %0d", state))
    foreach (ys[i]) begin
      move_ball(500, ys[i]);
      next_center();
      repeat (2) @(posedge clk); #1;
      `TB_CHECK(near(int'(y_center), ys[i], 2), $sformatf("tracked y %0d, ball at %0d", y_center, ys[i]))
      `TB_CHECK(state == 3'(i == 0 ? ST_HIGH : i == 1 ? ST_LOW_AFTER : ST_END_PLAY),
                $sformatf("state %0d after ball at %0d", state, ys[i]))
    end
    `TB_CHECK(point && record, "shot not judged high")
    n = 0;
    while (state == 3'(ST_END_PLAY) && n < POINT_TO_END + 1000) begin @(posedge clk); #1; n++; end
    `TB_CHECK(state == 3'(ST_IDLE) && !record && near(n, POINT_TO_END, 5),
              $sformatf("end of play lasted %0d clocks, state %0d", n, state))
    expect_pixel(70, 195, PIX_GREEN, "check mark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
