// vga_sync_tb: measures the line and frame the sync generator makes
// against the 640x480 standard: 800 clocks per line with a 96-clock
// hsync pulse starting 656 clocks into the line, 525 lines per frame with
// a 2-line vsync pulse, 640x480 visible pixels, x/y counting them.
module vga_sync_tb;
  logic clk = 0, rst_n = 0, video_on, hsync_n, vsync_n, frame_start;
  logic [9:0] x, y;
  int checks = 0, failures = 0;

  vga_sync dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last_hs_fall = -1, last_vs_fall = -1, hs_low = 0, vis = 0, lines_in_vs = 0;
  int fs_count = 0, last_fs = -1;
  logic hs_q = 1, vs_q = 1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!hsync_n) hs_low++;
    if (video_on) begin
      vis++;
      check(x < 640 && y < 480, "x/y outside the visible area while video_on");
    end
    if (!hsync_n && hs_q) begin
      if (last_hs_fall >= 0) check(cyc - last_hs_fall == 800, $sformatf("line length %0d", cyc - last_hs_fall));
      check(x == 656, $sformatf("hsync starts at x=%0d", x));
      last_hs_fall = cyc;
    end
    if (hsync_n && !hs_q) begin
      check(hs_low == 96, $sformatf("hsync width %0d", hs_low));
      hs_low = 0;
    end
    if (!vsync_n && vs_q) begin
      if (last_vs_fall >= 0) begin
        check(cyc - last_vs_fall == 800 * 525, $sformatf("frame length %0d", cyc - last_vs_fall));
        check(vis == 640 * 480, $sformatf("visible pixels %0d", vis));
      end
      check(y == 490, $sformatf("vsync starts at line %0d", y));
      vis = 0;
      last_vs_fall = cyc;
    end
    if (vsync_n && !vs_q) check(cyc - last_vs_fall == 2 * 800, $sformatf("vsync width %0d", cyc - last_vs_fall));
    if (frame_start) begin
      check(x == 0 && y == 0 && video_on, "frame_start position");
      fs_count++;
    end
    hs_q = hsync_n;
    vs_q = vsync_n;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (800 * 525 * 3 + 10) @(posedge clk);
    check(fs_count == 4, $sformatf("%0d frame starts", fs_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
