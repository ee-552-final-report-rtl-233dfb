// vga_sync: horizontal and vertical timing for a 640x480 VGA picture.
//
// Two counters walk the pixel grid: h counts pixel clocks along a line of
// H_VISIBLE + H_FRONT + H_SYNC + H_BACK, v counts lines of a frame. Sync
// pulses are active low. With the default numbers and a 25 MHz pixel
// clock this is the standard 640x480 mode at about 60 Hz. The original design
// only names the VGA port and its sync signals; the mode and its numbers
// are this design's choice (the standard values).
// Interface: x, y pixel position (valid while video_on), hsync_n, vsync_n,
// frame_start (one clock at x=0, y=0). All outputs are registered.
module vga_sync #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       video_on,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       frame_start
);
  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] h, v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0;
      v <= '0;
    end else if (h == 10'(H_TOTAL - 1)) begin
      h <= '0;
      v <= (v == 10'(V_TOTAL - 1)) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x           <= '0;
      y           <= '0;
      video_on    <= 1'b0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      frame_start <= 1'b0;
    end else begin
      x           <= h;
      y           <= v;
      video_on    <= (h < 10'(H_VISIBLE)) && (v < 10'(V_VISIBLE));
      hsync_n     <= !((h >= 10'(H_VISIBLE + H_FRONT)) && (h < 10'(H_VISIBLE + H_FRONT + H_SYNC)));
      vsync_n     <= !((v >= 10'(V_VISIBLE + V_FRONT)) && (v < 10'(V_VISIBLE + V_FRONT + V_SYNC)));
      frame_start <= (h == '0) && (v == '0);
    end
  end
endmodule
