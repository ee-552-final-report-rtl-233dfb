// char_rom: the character ROM holding the pixel pattern of each character.
//
// 128 characters of 8 rows by 8 pixels, addressed by {ASCII code, row};
// bit 7 of a row is its leftmost pixel. Patterns exist for A..Z, '.' and
// ','; every other code, space included, is blank. Each glyph is a 5x7
// pattern in columns 1..5 and rows 0..6 of its cell, written below as
// seven row bytes, top row first (row 7 of every cell is blank). The
// original design says only that one ROM holds the pixel definition of
// every character; the cell size, addressing by ASCII and the patterns are
// this design's choices. The ROM is a constant function of the address
// (a case table), so it synthesises without an initialisation file. The
// read is synchronous: data appears one clock after addr.
module char_rom (
  input  logic       clk,
  input  logic [9:0] addr,
  output logic [7:0] data
);
  // Seven pattern rows of one character, top row in the most significant byte.
  function automatic logic [55:0] glyph(input logic [6:0] code);
    logic [55:0] bits;
    case ({1'b0, code})
      8'h2C: bits = 56'h00_00_00_00_30_10_20; // ,
      8'h2E: bits = 56'h00_00_00_00_00_30_30; // .
      8'h41: bits = 56'h38_44_44_7C_44_44_44; // A
      8'h42: bits = 56'h78_44_44_78_44_44_78; // B
      8'h43: bits = 56'h38_44_40_40_40_44_38; // C
      8'h44: bits = 56'h78_44_44_44_44_44_78; // D
      8'h45: bits = 56'h7C_40_40_78_40_40_7C; // E
      8'h46: bits = 56'h7C_40_40_78_40_40_40; // F
      8'h47: bits = 56'h38_44_40_5C_44_44_3C; // G
      8'h48: bits = 56'h44_44_44_7C_44_44_44; // H
      8'h49: bits = 56'h38_10_10_10_10_10_38; // I
      8'h4A: bits = 56'h1C_08_08_08_08_48_30; // J
      8'h4B: bits = 56'h44_48_50_60_50_48_44; // K
      8'h4C: bits = 56'h40_40_40_40_40_40_7C; // L
      8'h4D: bits = 56'h44_6C_54_54_44_44_44; // M
      8'h4E: bits = 56'h44_64_54_4C_44_44_44; // N
      8'h4F: bits = 56'h38_44_44_44_44_44_38; // O
      8'h50: bits = 56'h78_44_44_78_40_40_40; // P
      8'h51: bits = 56'h38_44_44_44_54_48_34; // Q
      8'h52: bits = 56'h78_44_44_78_50_48_44; // R
      8'h53: bits = 56'h3C_40_40_38_04_04_78; // S
      8'h54: bits = 56'h7C_10_10_10_10_10_10; // T
      8'h55: bits = 56'h44_44_44_44_44_44_38; // U
      8'h56: bits = 56'h44_44_44_44_44_28_10; // V
      8'h57: bits = 56'h44_44_44_54_54_54_28; // W
      8'h58: bits = 56'h44_44_28_10_28_44_44; // X
      8'h59: bits = 56'h44_44_28_10_10_10_10; // Y
      8'h5A: bits = 56'h7C_04_08_10_20_40_7C; // Z
      default: bits = '0;
    endcase
    return bits;
  endfunction

  function automatic logic [7:0] rom_word(input logic [9:0] a);
    logic [55:0] g;
    g = glyph(a[9:3]);
    return (a[2:0] == 3'd7) ? 8'h00 : g[8*(6 - int'(a[2:0])) +: 8];
  endfunction

  always_ff @(posedge clk) data <= rom_word(addr);
endmodule
