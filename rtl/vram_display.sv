// vram_display: fetches camera pixels from the frame buffer for the raster.
//
// Each 36-bit frame-buffer word holds two horizontally adjacent 18-bit pixels,
// the even one in bits 35:18. The module asks for the word LOOKAHEAD pixels
// ahead of the current hcount (wrapping into the next line, and into line 0
// after the last line) at address {vcount, hcount[9:1]}. Read data is latched
// on even hcount and moved to the output word on odd hcount, which lets the
// odd cycles be used for writes. vr_pixel shows the upper half on even hcount
// and the lower half on odd hcount. With a memory that returns data two clocks
// after the address, a pixel reaches vr_pixel LOOKAHEAD-4 pixel clocks before
// the raster position it was stored for. The 8-pixel look-ahead and the
// latching scheme follow the document; wrapping at the true line length is
// this design's correction.
// Only bits 9:1 of the forecast column form the address, so its lowest and
// highest bits are left unused.
module vram_display #(
  parameter int LOOKAHEAD = 8,
  parameter int H_TOTAL   = 1344,
  parameter int V_TOTAL   = 806
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [17:0] vr_pixel,
  output logic [18:0] vram_addr,
  input  logic [35:0] vram_read_data
);

  logic [10:0] hcount_f;
  logic [9:0]  vcount_f;
  logic [35:0] latched, shown;

  always_comb begin
    if (hcount >= 11'(H_TOTAL - LOOKAHEAD)) begin
      hcount_f = hcount + 11'(LOOKAHEAD) - 11'(H_TOTAL);
      vcount_f = (vcount == 10'(V_TOTAL - 1)) ? 10'd0 : vcount + 10'd1;
    end else begin
      hcount_f = hcount + 11'(LOOKAHEAD);
      vcount_f = vcount;
    end
  end

  assign vram_addr = {vcount_f, hcount_f[9:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      latched <= '0;
      shown   <= '0;
    end else begin
      if (!hcount[0]) latched <= vram_read_data;
      if (hcount[0])  shown   <= latched;
    end
  end

  assign vr_pixel = hcount[0] ? shown[17:0] : shown[35:18];

endmodule
