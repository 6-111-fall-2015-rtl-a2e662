// ntsc_to_zbt: turns the decoded camera pixel stream into frame-buffer writes.
//
// Camera side (vclk): the decoder's f/v/h flags and data-valid strobe drive a
// column and a row counter. A rising edge of h starts a new line (column back
// to COL_START, row + 1); v high holds the row at ROW_START. Only pixels of
// field 0 are captured, and a flag that toggles at every new frame chooses
// which of the two interleaved display lines the field lands on, as the
// document's writer does. Each captured pixel is stored with its own column and
// row so the two always travel together.
// System side (clk): the capture strobe and the pixel registers are brought
// over with two flip-flops each; the strobe gets one more, so the data has
// settled for a cycle before it is used. Pixels are shifted into a 36-bit
// word; when the odd pixel of an even/odd pair arrives, ntsc_we pulses for one
// clk with the finished word in ntsc_data (even pixel in bits 35:18) and its
// address in ntsc_addr = {row+YOFFSET (9 bits), field flag, (col+XOFFSET)>>1}.
// The offsets place the camera image at the same raster position the tracking
// logic expects. Keeping column and row with each pixel, in place of the
// document's fixed four-clock realignment, is this design's choice.
module ntsc_to_zbt #(
  parameter int COL_START = 0,
  parameter int ROW_START = 0,
  parameter int XOFFSET   = 150,
  parameter int YOFFSET   = 125
) (
  input  logic        clk,        // system (display) clock
  input  logic        vclk,       // camera pixel clock
  input  logic        rst,        // synchronous to clk; vclk side resets via sync
  input  logic [2:0]  fvh,        // {field, vertical blank, horizontal sync}
  input  logic        dv,         // decoder data valid
  input  logic [17:0] din,        // pixel, 6 bits per channel
  output logic [18:0] ntsc_addr,
  output logic [35:0] ntsc_data,
  output logic        ntsc_we
);

  // ---------------- camera clock domain ----------------
  logic       vrst_m, vrst;
  logic [9:0] col, row;
  logic       old_dv, old_h, old_f, even_odd;
  logic [17:0] cap_pix;
  logic [9:0]  cap_col, cap_row;
  logic        cap_eo, cap_we;

  always_ff @(posedge vclk) begin
    {vrst, vrst_m} <= {vrst_m, rst};
  end

  always_ff @(posedge vclk) begin
    if (vrst) begin
      col <= 10'(COL_START); row <= 10'(ROW_START);
      old_dv <= 1'b0; old_h <= 1'b0; old_f <= 1'b0; even_odd <= 1'b0;
      cap_we <= 1'b0; cap_pix <= '0; cap_col <= '0; cap_row <= '0; cap_eo <= 1'b0;
    end else begin
      old_dv <= dv;
      old_h  <= fvh[0];
      old_f  <= fvh[2];
      if (fvh[2] && !old_f) even_odd <= !even_odd;
      cap_we <= 1'b0;
      if (!fvh[2]) begin
        if (fvh[0] && !old_h) begin
          col <= 10'(COL_START);
          if (!fvh[1] && row < 10'd768) row <= row + 10'd1;
        end else if (!fvh[1] && dv && !old_dv && col < 10'd1023) begin
          col     <= col + 10'd1;
          cap_pix <= din;
          cap_col <= col;
          cap_row <= row;
          cap_eo  <= even_odd;
          cap_we  <= 1'b1;
        end
        if (fvh[1]) row <= 10'(ROW_START);
      end
    end
  end

  // ---------------- system clock domain ----------------
  logic [17:0] pix_s1, pix_s2;
  logic [9:0]  col_s1, col_s2, row_s1, row_s2;
  logic        eo_s1, eo_s2;
  logic [2:0]  we_s;
  logic        we_edge;
  logic [17:0] prev_pix;   // even pixel of the pair being assembled

  always_ff @(posedge clk) begin
    {pix_s2, pix_s1} <= {pix_s1, cap_pix};
    {col_s2, col_s1} <= {col_s1, cap_col};
    {row_s2, row_s1} <= {row_s1, cap_row};
    {eo_s2,  eo_s1}  <= {eo_s1,  cap_eo};
    if (rst) we_s <= '0;
    else     we_s <= {we_s[1:0], cap_we};
  end

  assign we_edge = we_s[1] && !we_s[2];

  logic [9:0] x_sum, x_addr;
  logic [9:0] y_sum;
  logic [8:0] y_addr;

  always_comb begin
    x_sum  = col_s2 + 10'(XOFFSET);
    x_addr = x_sum;
    y_sum  = row_s2 + 10'(YOFFSET);
    y_addr = (y_sum < 10'd768) ? y_sum[8:0] : 9'(y_sum - 10'd768);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ntsc_we   <= 1'b0;
      ntsc_addr <= '0;
      ntsc_data <= '0;
      prev_pix  <= '0;
    end else begin
      ntsc_we <= 1'b0;
      if (we_edge) begin
        prev_pix <= pix_s2;
        if (x_addr[0]) begin
          ntsc_we   <= 1'b1;
          ntsc_data <= {prev_pix, pix_s2};
          ntsc_addr <= {y_addr, eo_s2, x_addr[9:1]};
        end
      end
    end
  end

endmodule
