// rgb2hsv: pipelined conversion of 8-bit RGB into 8-bit hue, saturation, value.
//
// Hue is mapped onto 0..255 for the full colour circle, so red sits at 0,
// green at 85 and blue at 170:
//   V = max(r,g,b),  S = 255*(max-min)/max,
//   H = base + 255*(a-b)/(6*(max-min)), base and (a,b) chosen by which channel
//   is the maximum; a negative hue fraction wraps around the circle.
// Stages: (1) latch inputs, (2) max and min, (3) value and delta, (4) the
// numerators and denominators of the two divisions, then two pipelined 16/16
// dividers of DIV_LATENCY clocks, then one stage that assembles H, S and V.
// Total latency is LATENCY = DIV_LATENCY + 5 clocks with one pixel per clock.
// The pipeline structure and the 18-clock divider follow the document; the
// divider itself is this design's own pipelined restoring divider. The reset
// input clears only the output registers.
// The saturation quotient never exceeds 255, so its upper eight bits are
// unused.
module rgb2hsv #(
  parameter int DIV_LATENCY = 18
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic [7:0] h,
  output logic [7:0] s,
  output logic [7:0] v
);


  logic [7:0] r1, g1, b1, r2, g2, b2, r3, g3, b3;
  logic [7:0] mx2, mn2, vmax3, delta3;
  logic [15:0] s_num, s_den, h_num, h_den;
  logic        h_neg4;
  logic [7:0]  h_base4, v4;

  // Side information that travels alongside the dividers.
  logic        neg_d  [DIV_LATENCY];
  logic [7:0]  base_d [DIV_LATENCY];
  logic [7:0]  v_d    [DIV_LATENCY];

  logic [15:0] s_quo, h_quo, s_rem_unused, h_rem_unused;

  always_ff @(posedge clk) begin
    // stage 1
    {r1, g1, b1} <= {r, g, b};
    // stage 2
    {r2, g2, b2} <= {r1, g1, b1};
    if (r1 >= g1 && r1 >= b1)      mx2 <= r1;
    else if (g1 >= r1 && g1 >= b1) mx2 <= g1;
    else                           mx2 <= b1;
    if (r1 <= g1 && r1 <= b1)      mn2 <= r1;
    else if (g1 <= r1 && g1 <= b1) mn2 <= g1;
    else                           mn2 <= b1;
    // stage 3
    {r3, g3, b3} <= {r2, g2, b2};
    vmax3  <= mx2;
    delta3 <= mx2 - mn2;
    // stage 4
    s_num <= 16'(delta3) * 16'd255;
    s_den <= (vmax3 != 0) ? {8'd0, vmax3} : 16'd1;
    h_den <= (delta3 != 0) ? 16'(delta3) * 16'd6 : 16'd6;
    v4    <= vmax3;
    if (r3 == vmax3) begin
      h_num   <= (g3 >= b3) ? 16'(g3 - b3) * 16'd255 : 16'(b3 - g3) * 16'd255;
      h_neg4  <= (g3 < b3);
      h_base4 <= 8'd0;
    end else if (g3 == vmax3) begin
      h_num   <= (b3 >= r3) ? 16'(b3 - r3) * 16'd255 : 16'(r3 - b3) * 16'd255;
      h_neg4  <= (b3 < r3);
      h_base4 <= 8'd85;
    end else begin
      h_num   <= (r3 >= g3) ? 16'(r3 - g3) * 16'd255 : 16'(g3 - r3) * 16'd255;
      h_neg4  <= (r3 < g3);
      h_base4 <= 8'd170;
    end
    // side pipeline, DIV_LATENCY long
    neg_d[0]  <= h_neg4;
    base_d[0] <= h_base4;
    v_d[0]    <= v4;
    for (int i = 1; i < DIV_LATENCY; i++) begin
      neg_d[i]  <= neg_d[i-1];
      base_d[i] <= base_d[i-1];
      v_d[i]    <= v_d[i-1];
    end
  end

  pipe_divider #(.W(16), .LATENCY(DIV_LATENCY)) u_sdiv (
    .clk(clk), .dividend(s_num), .divisor(s_den),
    .quotient(s_quo), .remainder(s_rem_unused));

  pipe_divider #(.W(16), .LATENCY(DIV_LATENCY)) u_hdiv (
    .clk(clk), .dividend(h_num), .divisor(h_den),
    .quotient(h_quo), .remainder(h_rem_unused));

  // Final stage: wrap negative hue fractions around the circle.
  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      s <= '0;
      v <= '0;
    end else begin
      if (neg_d[DIV_LATENCY-1]) begin
        if (h_quo > 16'(base_d[DIV_LATENCY-1]))
          h <= 8'd255 - h_quo[7:0] + base_d[DIV_LATENCY-1];
        else
          h <= base_d[DIV_LATENCY-1] - h_quo[7:0];
      end else begin
        h <= h_quo[7:0] + base_d[DIV_LATENCY-1];
      end
      s <= s_quo[7:0];
      v <= v_d[DIV_LATENCY-1];
    end
  end

endmodule
