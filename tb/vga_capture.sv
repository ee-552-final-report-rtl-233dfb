// vga_capture: rebuilds the 640x480 picture from VGA sync and colour lines,
// for testbenches.
//
// Uses only the standard 640x480 timing: the end of a horizontal sync
// pulse is pixel clock 752 of a line of 800, the end of a vertical sync
// pulse is line 492 of a frame of 525. pix[y][x] holds {red, green, blue}
// of the last frame drawn; frames counts completed frames.
module vga_capture (
  input logic clk,
  input logic hsync_n,
  input logic vsync_n,
  input logic red,
  input logic green,
  input logic blue
);
  logic [2:0] pix [480][640];
  int frames = 0;
  int h = -1, v = -1;
  logic hs_q = 1, vs_q = 1;

  always @(posedge clk) begin
    if (h >= 0) h = (h == 799) ? 0 : h + 1;
    if (h == 0 && v >= 0) begin
      v = (v == 524) ? 0 : v + 1;
      if (v == 480) frames++;
    end
    if (hsync_n && !hs_q) h = 752;
    if (vsync_n && !vs_q) v = 492;
    if (h >= 0 && v >= 0 && h < 640 && v < 480) pix[v][h] = {red, green, blue};
    hs_q = hsync_n;
    vs_q = vsync_n;
  end

  // Pattern of 8 pixels of one colour channel mask at text cell (col,row).
  function automatic logic [7:0] cell_row(input int col, input int row, input int line,
                                          input logic [2:0] mask);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[7-i] = |(pix[row*8+line][col*8+i] & mask);
    return r;
  endfunction
endmodule
