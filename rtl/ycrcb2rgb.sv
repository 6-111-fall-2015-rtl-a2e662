// ycrcb2rgb: converts 10-bit Y, Cr, Cb samples from the video decoder into
// 8-bit R, G, B.
//
// It evaluates the standard studio-range conversion
//   R = 1.164 (Y-64) + 1.596 (Cr-512)
//   G = 1.164 (Y-64) - 0.813 (Cr-512) - 0.392 (Cb-512)
//   B = 1.164 (Y-64) + 2.017 (Cb-512)
// with the coefficients as unsigned numbers with eight fraction bits
// (298, 408, 208, 100, 516 / 256), the constants the document uses. Results are
// clamped: negative sums give 0 and sums at or above 256 give 255.
// Three register stages (inputs, products, sums) give a latency of 3 clocks;
// a new sample may enter every clock. Reset clears the pipeline.
module ycrcb2rgb (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] y,
  input  logic [9:0] cr,
  input  logic [9:0] cb,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b
);

  localparam logic signed [11:0] K_Y    = 12'sd298;  // 1.164
  localparam logic signed [11:0] K_R_CR = 12'sd408;  // 1.596
  localparam logic signed [11:0] K_G_CR = 12'sd208;  // 0.813
  localparam logic signed [11:0] K_G_CB = 12'sd100;  // 0.392
  localparam logic signed [11:0] K_B_CB = 12'sd516;  // 2.017

  logic signed [11:0] y_s, cr_s, cb_s;                // offset-removed inputs
  logic signed [22:0] p_y, p_rcr, p_gcr, p_gcb, p_bcb; // products
  logic signed [22:0] sum_r, sum_g, sum_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      y_s <= '0; cr_s <= '0; cb_s <= '0;
      p_y <= '0; p_rcr <= '0; p_gcr <= '0; p_gcb <= '0; p_bcb <= '0;
      sum_r <= '0; sum_g <= '0; sum_b <= '0;
    end else begin
      y_s  <= $signed({2'b00, y})  - 12'sd64;
      cr_s <= $signed({2'b00, cr}) - 12'sd512;
      cb_s <= $signed({2'b00, cb}) - 12'sd512;

      p_y   <= 23'(y_s  * K_Y);
      p_rcr <= 23'(cr_s * K_R_CR);
      p_gcr <= 23'(cr_s * K_G_CR);
      p_gcb <= 23'(cb_s * K_G_CB);
      p_bcb <= 23'(cb_s * K_B_CB);

      sum_r <= p_y + p_rcr;
      sum_g <= p_y - p_gcr - p_gcb;
      sum_b <= p_y + p_bcb;
    end
  end

  // Sums are in units of 1/1024 of an 8-bit level (10-bit inputs, 8 fraction bits).
  function automatic logic [7:0] clamp8(input logic signed [22:0] v);
    if (v < 0)                 return 8'd0;
    else if (v >= 23'sd262144) return 8'd255;
    else                       return v[17:10];
  endfunction

  assign r = clamp8(sum_r);
  assign g = clamp8(sum_g);
  assign b = clamp8(sum_b);

endmodule
