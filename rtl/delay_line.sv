// delay_line: delays a WIDTH-bit bus by DEPTH clock cycles.
//
// A plain shift register with no reset. The display pipeline uses it to hold
// hcount, vcount, sync, blank and pixel data back by the latency of the
// RGB-to-HSV converter, so that every signal reaching the hue detector and the
// sprites belongs to the same pixel. Output = input from DEPTH cycles earlier.
module delay_line #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 22
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    stage[0] <= din;
    for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
  end

  assign dout = stage[DEPTH-1];

endmodule
