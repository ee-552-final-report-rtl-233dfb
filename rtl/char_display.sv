// char_display: the VGA driver of the binary keyboard.
//
// Shows the title message on one text row and, below it, the characters
// typed on the keyboard, on a 640x480 VGA screen divided into 8x8-pixel
// character cells (80 columns by 60 rows).
//
// Writing: the typed text lives in a buffer of TEXT_ROWS lines of
// TEXT_COLS characters with a cursor. A character is taken on the rising
// edge of en only, so an enable that stays high for several clocks still
// writes once, which is the original design's rule for the VGA enable. A letter,
// space, '.' or ',' is stored at the cursor and the cursor advances;
// backspace steps the cursor back and blanks that cell with a space;
// carriage return moves the cursor to the start of the next line. The
// cursor wraps from the end of the buffer to its start. ASCII 00h (no
// character) is ignored. After reset the buffer is cleared to spaces, one
// cell per clock, before writes are taken (a write arriving then is lost).
//
// Drawing: a three-stage pipeline follows the sync generator. Stage 1
// picks the ASCII code of the cell under the beam from the title ROM or
// the text buffer, stage 2 reads the row of its pattern from the character
// ROM, stage 3 selects the pixel and registers the colour together with
// the sync signals, which are delayed by the same three clocks. The title
// is drawn yellow and the typed text white on black.
//
// What follows the original design: title above the typed text, a character ROM
// and a title ROM, one refresh per enable event, 5 VGA signals of one bit.
// The layout, colours, buffer size, cursor rules and pipeline are this
// design's own choices.
// Interface: en and ascii[7:0] from the data handling stage; vga_red,
// vga_green, vga_blue, vga_hsync_n, vga_vsync_n to the VGA connector;
// wr_event pulses for each character taken.
module char_display
  import bk_pkg::*;
#(
  parameter int unsigned TEXT_COLS = 80,
  parameter int unsigned TEXT_ROWS = 4,
  parameter int unsigned TITLE_ROW = 2,
  parameter int unsigned TITLE_COL = 2,
  parameter int unsigned TEXT_ROW  = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  byte_t ascii,
  output logic  vga_red,
  output logic  vga_green,
  output logic  vga_blue,
  output logic  vga_hsync_n,
  output logic  vga_vsync_n,
  output logic  wr_event
);
  localparam int unsigned CELLS  = TEXT_COLS * TEXT_ROWS;
  localparam int unsigned AW     = $clog2(CELLS);
  localparam int unsigned TITLE_LEN = 21;

  // ---------------------------------------------------------------- write
  logic [6:0]    text_buf [CELLS];
  logic [AW-1:0] cursor, clr_addr, line_start, next_line;
  logic          clearing, en_q;

  always_comb begin
    line_start = '0;
    for (int r = 0; r < int'(TEXT_ROWS); r++)
      if (int'(cursor) >= r * int'(TEXT_COLS)) line_start = AW'(r * int'(TEXT_COLS));
    next_line = (int'(line_start) + int'(TEXT_COLS) >= int'(CELLS))
                  ? '0 : line_start + AW'(TEXT_COLS);
  end

  assign wr_event = en && !en_q && !clearing && (ascii != 8'h00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cursor   <= '0;
      clr_addr <= '0;
      clearing <= 1'b1;
      en_q     <= 1'b0;
    end else begin
      en_q <= en;
      if (clearing) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == AW'(CELLS - 1)) clearing <= 1'b0;
      end else if (wr_event) begin
        unique case (ascii)
          ASCII_BKSP: if (cursor != '0) cursor <= cursor - 1'b1;
          ASCII_CR:   cursor <= next_line;
          default:    cursor <= (cursor == AW'(CELLS - 1)) ? '0 : cursor + 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)
      text_buf[clr_addr] <= 7'h20;
    else if (wr_event) begin
      if (ascii == ASCII_BKSP) begin
        if (cursor != '0) text_buf[cursor - 1'b1] <= 7'h20;
      end else if (ascii != ASCII_CR) begin
        text_buf[cursor] <= ascii[6:0];
      end
    end
  end

  // ----------------------------------------------------------------- draw
  logic [9:0] x, y;
  logic       video_on, hs0, vs0, frame_start;

  vga_sync u_sync (
    .clk, .rst_n, .x, .y, .video_on, .hsync_n(hs0), .vsync_n(vs0), .frame_start
  );

  logic [6:0] col;
  logic [5:0] row;
  logic       in_title, in_text;
  logic [7:0] title_ch;
  logic [6:0] cell_ch;
  logic [AW-1:0] text_idx;

  assign col = x[9:3];
  assign row = y[8:3];
  assign in_title = (row == 6'(TITLE_ROW)) && (col >= 7'(TITLE_COL))
                    && (col < 7'(TITLE_COL + TITLE_LEN));
  assign in_text  = (row >= 6'(TEXT_ROW)) && (row < 6'(TEXT_ROW + TEXT_ROWS))
                    && (col < 7'(TEXT_COLS));
  assign text_idx = AW'((int'(row) - int'(TEXT_ROW)) * int'(TEXT_COLS) + int'(col));

  title_rom u_title (.addr(col - 7'(TITLE_COL)), .data(title_ch));

  always_comb begin
    if (in_title)     cell_ch = title_ch[6:0];
    else if (in_text) cell_ch = text_buf[text_idx];
    else              cell_ch = 7'h20;
  end

  // stage 1
  logic [6:0] ch1;
  logic [2:0] line1, xb1, xb2;
  logic [1:0] vid, ttl;
  logic [2:0] hs, vs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch1 <= 7'h20; line1 <= '0; xb1 <= '0; xb2 <= '0;
      vid <= '0; hs <= '1; vs <= '1; ttl <= '0;
    end else begin
      ch1   <= cell_ch;
      line1 <= y[2:0];
      xb1   <= x[2:0];
      xb2   <= xb1;
      vid   <= {vid[0], video_on};
      hs    <= {hs[1:0], hs0};
      vs    <= {vs[1:0], vs0};
      ttl   <= {ttl[0], in_title};
    end
  end

  // stage 2: character ROM
  logic [7:0] pattern;
  char_rom u_rom (.clk, .addr({ch1, line1}), .data(pattern));

  // stage 3
  logic pixel;
  assign pixel = pattern[3'd7 - xb2] && vid[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_red <= 1'b0; vga_green <= 1'b0; vga_blue <= 1'b0;
    end else begin
      vga_red   <= pixel;
      vga_green <= pixel;
      vga_blue  <= pixel && !ttl[1];
    end
  end

  assign vga_hsync_n = hs[2];
  assign vga_vsync_n = vs[2];
endmodule
