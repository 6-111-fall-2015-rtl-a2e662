// tb_shot_memory: an 8-entry shot memory with a frame tick every 6 clocks.
// A 5-frame recording must replay as exactly those five centers in order,
// looping; half-speed replay must show each entry for two frames; a recording
// of 11 frames must wrap and overwrite the oldest entries, and its replay must
// cover all 8 entries. Nothing may be written while not recording, and each
// replay starts again from the first entry, also when it is requested on
// the clock after recording stops.
`include "tb/tb_util.svh"
module tb_shot_memory;
  localparam int LOG = 3, DEPTH = 8;
  logic clk = 0, rst, frame_tick, record, replay, slow_toggle, slow;
  logic [24:0] din, dout;
  logic [LOG-1:0] addr;
  int checks = 0, failures = 0;
  int frame = 0;

  always #5 clk = ~clk;

  shot_memory #(.LOGSIZE(LOG)) dut (.clk, .rst, .frame_tick, .record, .replay,
    .slow_toggle, .din, .dout, .addr, .slow);

  function automatic logic [24:0] center(int f);
    return {13'(100 + f * 3), 12'(300 + f * 5)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame: the center is presented with the tick, as the tracker does.
  task automatic next_frame();
    frame++;
    din = center(frame);
    frame_tick = 1; @(posedge clk); #1;
    frame_tick = 0; din = '0;
    repeat (5) @(posedge clk); #1;
  endtask

  task automatic expect_replay(int exp [$], input string what);
    foreach (exp[i]) begin
      `TB_CHECK(dout == center(exp[i]), $sformatf("%s step %0d: got %h want frame %0d", what, i, dout, exp[i]))
      next_frame();
    end
  endtask

  initial begin
    int first, seq [$];
    rst = 1; frame_tick = 0; record = 0; replay = 0; slow_toggle = 0; din = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    repeat (3) next_frame();

    // Five-frame recording.
    record = 1; first = frame + 1;
    repeat (5) next_frame();
    record = 0;
    next_frame();  // closes the recording
    repeat (4) next_frame();  // idle frames write nothing
    replay = 1; @(posedge clk); #1; @(posedge clk); #1;
    seq = {};
    for (int k = 0; k < 12; k++) seq.push_back(first + (k % 5));
    expect_replay(seq, "replay");

    // Half speed.
    slow_toggle = 1; @(posedge clk); #1; slow_toggle = 0;
    `TB_CHECK(slow, "slow mode on")
    replay = 0; @(posedge clk); #1; replay = 1; @(posedge clk); #1; @(posedge clk); #1;
    seq = {};
    for (int k = 0; k < 12; k++) seq.push_back(first + ((k / 2) % 5));
    expect_replay(seq, "slow replay");
    slow_toggle = 1; @(posedge clk); #1; slow_toggle = 0;
    `TB_CHECK(!slow, "slow mode off")
    replay = 0;

    // Wrapping recording of 11 frames.
    record = 1; first = frame + 1;
    repeat (11) next_frame();
    record = 0;
    next_frame();
    replay = 1; @(posedge clk); #1; @(posedge clk); #1;
    seq = {};
    // Address a holds the last frame written there.
    for (int k = 0; k < 16; k++) begin
      int a;
      a = k % DEPTH;
      seq.push_back(a < 3 ? first + 8 + a : first + a);
    end
    expect_replay(seq, "wrapped replay");
    replay = 0;

    // Replay requested right after recording stops, before the next tick.
    record = 1; first = frame + 1;
    repeat (3) next_frame();
    record = 0; @(posedge clk); #1;
    replay = 1; @(posedge clk); #1; @(posedge clk); #1;
    seq = {};
    for (int k = 0; k < 7; k++) seq.push_back(first + (k % 3));
    expect_replay(seq, "replay straight after recording");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
