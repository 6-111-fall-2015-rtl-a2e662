// center_of_mass: once per frame, the mean position of all matching pixels.
//
// While the raster is inside the accumulation area (XMIN..XMAX, YMIN..YMAX,
// inclusive) the module adds hcount and vcount of every matching pixel to two
// sums and counts the matches; the sums restart at the area's top-left pixel.
// When the raster reaches (XMAX+50, YMAX) the frame is closed and both sums are
// handed to two pipelined 32-bit dividers. DIV_LATENCY clocks later done pulses
// for one clock with the new center in x_center/y_center and the number of
// matches in final_count; x_center/y_center change on the same clock as done
// rises. A frame with no matches keeps the previous center,
// so the tracker holds the last place the object was seen. With smooth high
// the reported center is the mean of the last four non-empty frame centers.
// The accumulation area, the close-of-frame point and the output widths follow
// the document; the pipelined divider, the hold on empty frames and the
// four-frame mean used for smoothing are this design's choices.
// A center fits in 11 (x) and 10 (y) bits, so the upper quotient bits are
// unused, as are the two low bits of the four-center sums (divided by 4).
module center_of_mass #(
  parameter int XMIN        = 150,
  parameter int XMAX        = 850,
  parameter int YMIN        = 260,
  parameter int YMAX        = 750,
  parameter int DIV_LATENCY = 34
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        smooth,
  input  logic        match,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [12:0] x_center,
  output logic [11:0] y_center,
  output logic [23:0] final_count,
  output logic        done
);

  logic [31:0] x_sum, y_sum;
  logic [23:0] count;
  logic        frame_done;
  logic [DIV_LATENCY-1:0] busy;   // tracks the division in flight
  logic [31:0] x_quo, y_quo, x_rem_unused, y_rem_unused;
  logic [10:0] x_hist [3];   // previous frame centers, newest first
  logic [9:0]  y_hist [3];

  logic in_area;
  assign in_area = hcount >= 11'(XMIN) && hcount <= 11'(XMAX) &&
                   vcount >= 10'(YMIN) && vcount <= 10'(YMAX);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_sum <= '0; y_sum <= '0; count <= '0; frame_done <= 1'b0;
    end else begin
      if (in_area) begin
        if (hcount == 11'(XMIN) && vcount == 10'(YMIN)) begin
          x_sum <= '0; y_sum <= '0; count <= '0;
        end else if (match) begin
          x_sum <= x_sum + 32'(hcount);
          y_sum <= y_sum + 32'(vcount);
          count <= count + 24'd1;
        end
      end
      frame_done <= (vcount == 10'(YMAX) && hcount == 11'(XMAX + 50));
    end
  end

  pipe_divider #(.W(32), .LATENCY(DIV_LATENCY)) u_xdiv (
    .clk(clk), .dividend(x_sum), .divisor({8'd0, count}),
    .quotient(x_quo), .remainder(x_rem_unused));

  pipe_divider #(.W(32), .LATENCY(DIV_LATENCY)) u_ydiv (
    .clk(clk), .dividend(y_sum), .divisor({8'd0, count}),
    .quotient(y_quo), .remainder(y_rem_unused));

  // The sums and count presented with frame_done enter the dividers on the
  // same clock; the count is carried alongside to decide on an empty frame.
  logic [23:0] count_hold;
  logic [12:0] x_sum4;
  logic [11:0] y_sum4;

  // Mean of the newest quotient and the three previous frame centers.
  always_comb begin
    x_sum4 = 13'(x_quo[10:0]) + 13'(x_hist[0]) + 13'(x_hist[1]) + 13'(x_hist[2]);
    y_sum4 = 12'(y_quo[9:0])  + 12'(y_hist[0]) + 12'(y_hist[1]) + 12'(y_hist[2]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0; done <= 1'b0; count_hold <= '0;
      x_center <= '0; y_center <= '0; final_count <= '0;
      for (int i = 0; i < 3; i++) begin x_hist[i] <= '0; y_hist[i] <= '0; end
    end else begin
      busy <= {busy[DIV_LATENCY-2:0], frame_done};
      if (frame_done) count_hold <= count;
      done <= 1'b0;
      if (busy[DIV_LATENCY-1]) begin
        done        <= 1'b1;
        final_count <= count_hold;
        if (count_hold != 0) begin
          x_hist[0] <= x_quo[10:0];
          y_hist[0] <= y_quo[9:0];
          for (int i = 1; i < 3; i++) begin
            x_hist[i] <= x_hist[i-1];
            y_hist[i] <= y_hist[i-1];
          end
          if (smooth) begin
            x_center <= {2'b00, x_sum4[12:2]};
            y_center <= {2'b00, y_sum4[11:2]};
          end else begin
            x_center <= {2'b00, x_quo[10:0]};
            y_center <= {2'b00, y_quo[9:0]};
          end
        end
      end
    end
  end

endmodule
