// shot_memory: records the ball track of one shot and plays it back.
//
// The memory holds 2**LOGSIZE entries of 25 bits, one center of mass
// {x (13 bits), y (12 bits)} per video frame. Everything advances on
// frame_tick, the one-clock pulse that accompanies each new center:
//  - while record is high, the center is written at addr and addr steps on,
//    wrapping so that the oldest entries are overwritten; the first tick of a
//    recording starts again at address 0;
//  - on the clock where record falls, addr returns to 0 and the number of
//    entries written (all of them if the memory wrapped) becomes the clip
//    length, so a replay may start at once;
//  - while replay is high and record is low, addr steps through the clip and
//    loops; with slow mode on it steps only on every second tick (half speed).
//    Entering replay restarts the clip at address 0.
// slow_toggle flips slow mode on each rising edge. dout is the entry at addr,
// read synchronously (one clock after addr changes). The memory organisation,
// the address handling and half-speed replay follow the document; advancing
// on an enable in the system clock domain, rather than clocking the memory
// with the frame pulse, and looping within the recorded length are this
// design's choices.
module shot_memory #(
  parameter int LOGSIZE = 9,
  parameter int WIDTH   = 25
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_tick,
  input  logic               record,
  input  logic               replay,
  input  logic               slow_toggle,
  input  logic [WIDTH-1:0]   din,
  output logic [WIDTH-1:0]   dout,
  output logic [LOGSIZE-1:0] addr,
  output logic               slow
);

  logic [WIDTH-1:0]   mem [2**LOGSIZE];
  logic               recording;      // a recording is in progress
  logic               wrapped;
  logic [LOGSIZE-1:0] clip_last;      // last address of the recorded clip
  logic               half;           // alternates in slow mode
  logic               replay_q, slow_toggle_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr          <= '0;
      recording     <= 1'b0;
      wrapped       <= 1'b0;
      clip_last     <= '0;
      half          <= 1'b0;
      slow          <= 1'b0;
      replay_q      <= 1'b0;
      slow_toggle_q <= 1'b0;
    end else begin
      replay_q      <= replay;
      slow_toggle_q <= slow_toggle;
      if (slow_toggle && !slow_toggle_q) slow <= !slow;
      if (recording && !record) begin
        // the clip is closed as soon as recording stops
        recording <= 1'b0;
        clip_last <= wrapped ? '1 : addr - 1'b1;
        addr      <= '0;
        half      <= 1'b0;
      end else if (replay && !replay_q && !record) begin
        addr <= '0;
        half <= 1'b0;
      end else if (frame_tick) begin
        if (record && !recording) begin
          recording <= 1'b1;
          wrapped   <= 1'b0;
          addr      <= LOGSIZE'(1);
        end else if (record) begin
          addr <= addr + 1'b1;
          if (addr == '1) wrapped <= 1'b1;
        end else if (replay) begin
          half <= !half;
          if (!slow || half) addr <= (addr >= clip_last) ? '0 : addr + 1'b1;
        end
      end
    end
  end

  // Write port: the first tick of a recording writes address 0.
  logic [LOGSIZE-1:0] waddr;
  assign waddr = (record && !recording) ? '0 : addr;

  always_ff @(posedge clk) begin
    if (frame_tick && record) mem[waddr] <= din;
    dout <= mem[addr];
  end

endmodule
