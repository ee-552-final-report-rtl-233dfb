// char_display_tb: types characters (letters, '.', ',', space, backspace,
// carriage return, more than a line's worth) into the VGA driver with
// enables held for several clocks, rebuilds the picture from the VGA lines
// and compares every cell of the title row and of the text area with the
// expected text drawn in the expected colours. Also checks that each enable
// event writes exactly once.
module char_display_tb;
  localparam int COLS = 80, ROWS = 4, TROW = 2, TCOL = 2, XROW = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] ascii = 0;
  logic vga_red, vga_green, vga_blue, vga_hsync_n, vga_vsync_n, wr_event;
  int checks = 0, failures = 0, writes = 0;
  logic [7:0] font [1024];
  byte unsigned screen [COLS*ROWS];
  int cur = 0;
  string title = "DATAD BINARY KEYBOARD";
  string hello = "HELLO";

  char_display dut (.*);
  vga_capture cap (.clk, .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n),
                   .red(vga_red), .green(vga_green), .blue(vga_blue));

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_event) writes++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model of the text buffer
  task automatic type_char(input byte unsigned c);
    @(negedge clk) ascii = c; en = 1;
    repeat ($urandom_range(1, 6)) @(negedge clk);
    en = 0;
    repeat (3) @(negedge clk);
    if (c == 8'h08) begin
      if (cur > 0) begin cur--; screen[cur] = " "; end
    end else if (c == 8'h0D) begin
      cur = ((cur / COLS) + 1) * COLS;
      if (cur >= COLS * ROWS) cur = 0;
    end else begin
      screen[cur] = c;
      cur = (cur == COLS * ROWS - 1) ? 0 : cur + 1;
    end
  endtask

  task automatic check_cell(input int col, input int row, input byte unsigned c,
                            input logic [2:0] colour);
    for (int l = 0; l < 8; l++) begin
      logic [7:0] exp, got, other;
      exp = font[{c[6:0], 3'(l)}];
      got = cap.cell_row(col, row, l, colour);
      other = cap.cell_row(col, row, l, ~colour);
      checks++;
      if (got !== exp || other !== 8'h00) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cell (%0d,%0d) '%c' line %0d got %h exp %h other %h", col, row, c, l, got, exp, other);
      end
    end
  endtask

  task automatic check_screen();
    int f;
    f = cap.frames;
    wait (cap.frames >= f + 2);
    for (int c = 0; c < 80; c++)
      check_cell(c, TROW, (c >= TCOL && c < TCOL + title.len()) ? title[c - TCOL] : " ", 3'b110);
    for (int i = 0; i < COLS * ROWS; i++)
      check_cell(i % COLS, XROW + i / COLS, screen[i], 3'b111);
    check_cell(10, XROW + ROWS, " ", 3'b111);
  endtask

  initial begin
    int nwr;
    $readmemh("tb/font8x8.hex", font);
    for (int i = 0; i < COLS * ROWS; i++) screen[i] = " ";
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    nwr = 0;
    for (int i = 0; i < hello.len(); i++) begin type_char(hello[i]); nwr++; end
    type_char(8'h08); type_char(8'h08); nwr += 2;
    type_char("P"); type_char("."); type_char(" "); type_char(","); nwr += 4;
    type_char(8'h0D); nwr++;
    for (int i = 0; i < 90; i++) begin type_char(8'(65 + $urandom_range(0, 25))); nwr++; end
    type_char(8'h0D); type_char("Z"); nwr += 2;
    // zero byte is not a character
    type_char(8'h00);
    check(writes == nwr, $sformatf("%0d writes for %0d enable events", writes, nwr));
    check_screen();
    // backspace at the very start of the buffer after wrapping with CRs
    type_char(8'h0D); type_char(8'h0D); type_char("Q");
    type_char(8'h08); type_char(8'h08);
    check_screen();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
