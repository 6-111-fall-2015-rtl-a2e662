// xvga: raster timing generator for a 1024x768, 60 Hz XGA display.
//
// Two counters walk the raster: hcount over H_TOTAL pixel clocks per line and
// vcount over V_TOTAL lines per frame. hsync and vsync are active low; blank is
// high outside the visible 1024x768 area. All outputs are registered together,
// so hsync, vsync and blank always describe the hcount/vcount on the same cycle.
// The line and frame totals and the sync positions (1344 clocks per line with
// sync low at pixels 1048..1183, 806 lines per frame with sync low on lines
// 777..782) follow the document's 65 MHz XGA timing. The synchronous reset is
// this design's addition.
module xvga #(
  parameter int H_ACTIVE     = 1024,
  parameter int H_SYNC_START = 1048,
  parameter int H_SYNC_END   = 1184,
  parameter int H_TOTAL      = 1344,
  parameter int V_ACTIVE     = 768,
  parameter int V_SYNC_START = 777,
  parameter int V_SYNC_END   = 783,
  parameter int V_TOTAL      = 806
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    if (hcount == 11'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      h_next = hcount + 11'd1;
      v_next = vcount;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync  <= !(h_next >= 11'(H_SYNC_START) && h_next < 11'(H_SYNC_END));
      vsync  <= !(v_next >= 10'(V_SYNC_START) && v_next < 10'(V_SYNC_END));
      blank  <= (h_next >= 11'(H_ACTIVE)) || (v_next >= 10'(V_ACTIVE));
    end
  end

endmodule
