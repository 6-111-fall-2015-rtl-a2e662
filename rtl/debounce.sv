// debounce: cleans a mechanical push-button or switch signal.
//
// The raw input is synchronised with two flip-flops. The clean output takes
// the synchronised value only after it has stayed different from the current
// output for DELAY consecutive clocks; shorter glitches are ignored. Reset
// sets the output to the current raw value. Output latency for a clean edge:
// DELAY + 2 clocks (two synchroniser stages, then DELAY clocks of agreement).
// The document uses debounced buttons but does not show the debouncer; this
// one and its 10 ms default (650,000 clocks at 65 MHz) are this design's
// choice.
module debounce #(
  parameter int unsigned DELAY = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);

  logic        s1, s2;
  logic [$clog2(DELAY+1)-1:0] count;

  always_ff @(posedge clk) begin
    {s2, s1} <= {s1, noisy};
    if (rst) begin
      clean <= noisy;
      count <= '0;
    end else if (s2 == clean) begin
      count <= '0;
    end else if (count == ($bits(count))'(DELAY - 1)) begin
      clean <= s2;
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
