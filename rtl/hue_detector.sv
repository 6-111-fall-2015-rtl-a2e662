// hue_detector: decides for every pixel whether it has the colour of the
// tracked object, and colours the display to show the decision.
//
// A pixel matches when it lies inside the tracking window and its hue, its
// saturation and its value are all inside their ranges. The hue range is
// chosen with the 2-bit color input (0 red, 1 blue, 2 green, 3 yellow);
// saturation must lie strictly between MIN_S and MAX_S and value strictly
// between MIN_V and MAX_V. The window is the whole camera area
// (XMIN..XMAX, YMIN..YMAX, exclusive) while the supplied center is (0,0), and
// otherwise a +-WIN box around the supplied center, clipped to that area.
// With background high the display shows magenta for a full match, blue for
// hue and saturation only, green for hue only and black elsewhere; with
// background low the camera pixel passes unchanged.
// Timing: H, S, V, rgb, hcount and vcount must describe the same pixel; match
// and test_rgb follow two clocks later. The window registers take the new
// center one clock after it changes. Ranges, colours, window size and area are
// the document's; aligning rgb with the HSV decision is this design's choice.
module hue_detector
  import snappa_pkg::*;
#(
  parameter int         XMIN  = 150,
  parameter int         XMAX  = 850,
  parameter int         YMIN  = 260,
  parameter int         YMAX  = 750,
  parameter int         WIN   = 50,
  parameter logic [7:0] MIN_S = 8'h30,
  parameter logic [7:0] MAX_S = 8'hB0,
  parameter logic [7:0] MIN_V = 8'h30,
  parameter logic [7:0] MAX_V = 8'hF0
) (
  input  logic        clk,
  input  logic [7:0]  h,
  input  logic [7:0]  s,
  input  logic [7:0]  v,
  input  logic [1:0]  color,
  input  logic        background,
  input  pixel_t      rgb,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [10:0] x_center,
  input  logic [9:0]  y_center,
  output pixel_t      test_rgb,
  output logic        match
);

  logic [10:0] x_start, x_end;
  logic [9:0]  y_start, y_end;
  logic        hit_h, hit_s, hit_v;
  pixel_t      rgb_q;

  // Tracking window around the last center of mass.
  always_ff @(posedge clk) begin
    if (x_center == '0 && y_center == '0) begin
      x_start <= 11'(XMIN);
      x_end   <= 11'(XMAX);
      y_start <= 10'(YMIN);
      y_end   <= 10'(YMAX);
    end else begin
      x_start <= (x_center < 11'(XMIN + WIN)) ? 11'(XMIN) : x_center - 11'(WIN);
      x_end   <= (x_center > 11'(XMAX - WIN)) ? 11'(XMAX) : x_center + 11'(WIN);
      y_start <= (y_center < 10'(YMIN + WIN)) ? 10'(YMIN) : y_center - 10'(WIN);
      y_end   <= (y_center > 10'(YMAX - WIN)) ? 10'(YMAX) : y_center + 10'(WIN);
    end
  end

  function automatic logic hue_in_range(input logic [1:0] sel, input logic [7:0] hue);
    unique case (sel)
      2'd0:    return hue > 8'h00 && hue < 8'h18;  // red
      2'd1:    return hue > 8'h96 && hue < 8'hBE;  // blue
      2'd2:    return hue > 8'h20 && hue < 8'h3F;  // green
      default: return hue > 8'h10 && hue < 8'h2F;  // yellow
    endcase
  endfunction

  logic in_window;
  assign in_window = hcount > x_start && hcount < x_end &&
                     vcount > y_start && vcount < y_end;

  // Stage 1: range tests.
  always_ff @(posedge clk) begin
    hit_h <= in_window && hue_in_range(color, h);
    hit_s <= s > MIN_S && s < MAX_S;
    hit_v <= v > MIN_V && v < MAX_V;
    rgb_q <= rgb;
  end

  // Stage 2: decision and display colour.
  always_ff @(posedge clk) begin
    match <= hit_h && hit_s && hit_v;
    if (!background)               test_rgb <= rgb_q;
    else if (!hit_h)               test_rgb <= PIX_BLACK;
    else if (!hit_s)               test_rgb <= PIX_GREEN;
    else if (!hit_v)               test_rgb <= PIX_BLUE;
    else                           test_rgb <= PIX_MAGENTA;
  end

endmodule
