// data_control: the data handling stage of the binary keyboard.
//
// Five finger switches (active low, pulled up, closed to ground) are each
// debounced and inverted into key-pressed lines. A NOR gate over them is
// high only while every key is released; its output is debounced as well.
// The pressed lines set a five-bit SR flip-flop, so keys that arrive at
// different times are collected into one code. When the last key is
// released the NOR output rises and:
//   * load control turns the edge into a LOAD_CYCLES pulse that loads the
//     SR flip-flop into the five-bit register;
//   * the ASCII decoder is enabled by the load pulse delayed one clock, and
//     the VGA enable is that enable delayed one more clock;
//   * the PS/2 enable is a second load-control pulse, PS2_EN_CYCLES long,
//     taken from the NOR output delayed two clocks so that it rises only
//     once the register holds the new code;
//   * delay D2 (D2_CYCLES, longer than the load pulse) clears the SR
//     flip-flop after the register load has ended.
// The structure, the 1 ms debounce and the roughly three 25 kHz periods of
// the PS/2 enable follow the original design. The load pulse and D2 lengths and
// the one-clock enable delays are this design's choices. At power-up the
// NOR output is high, so one load of the all-zero (no character) code
// happens, as the original design describes.
//
// Interface: key_n[4] thumb (MSB) .. key_n[0] little finger (LSB), active
// low. code is the register, ascii/ascii_valid the decoder output,
// vga_en and ps2_en the enables of the two output paths.
// Timing: a character appears about 2 ms after its last key is released
// (two debounce samples), code one clock after the load pulse starts,
// ascii two clocks after, vga_en two clocks after.
module data_control
  import bk_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 25000,
  parameter int unsigned LOAD_CYCLES     = 25,
  parameter int unsigned D2_CYCLES       = 50,
  parameter int unsigned PS2_EN_CYCLES   = 3000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [4:0] key_n,
  output key_code_t code,
  output byte_t     ascii,
  output logic      ascii_valid,
  output logic      vga_en,
  output logic      ps2_en,
  output logic      reg_load,
  output logic      latch_clr
);
  logic [4:0] key_db_n, pressed, latched;
  logic       nor_raw, nor_db, nor_d2, dec_en;

  for (genvar i = 0; i < 5; i++) begin : g_db
    debouncer #(.SAMPLE_CYCLES(DEBOUNCE_CYCLES), .RESET_VAL(1'b1)) u_db (
      .clk, .rst_n, .din(key_n[i]), .dout(key_db_n[i])
    );
  end
  assign pressed = ~key_db_n;

  key_nor u_nor (.pressed, .all_released(nor_raw));

  debouncer #(.SAMPLE_CYCLES(DEBOUNCE_CYCLES), .RESET_VAL(1'b1)) u_db_nor (
    .clk, .rst_n, .din(nor_raw), .dout(nor_db)
  );

  delay_line #(.DELAY(D2_CYCLES), .RESET_VAL(1'b1)) u_d2 (
    .clk, .rst_n, .din(nor_db), .dout(latch_clr)
  );

  key_latch u_latch (.clk, .rst_n, .set(pressed), .clr(latch_clr), .q(latched));

  load_control #(.WIDTH(LOAD_CYCLES)) u_load (
    .clk, .rst_n, .din(nor_db), .pulse(reg_load)
  );

  data_register u_reg (.clk, .rst_n, .load(reg_load), .d(latched), .q(code));

  delay_line #(.DELAY(1)) u_dec_dly (.clk, .rst_n, .din(reg_load), .dout(dec_en));

  ascii_decoder u_dec (
    .clk, .rst_n, .en(dec_en), .code, .ascii, .valid(ascii_valid)
  );

  delay_line #(.DELAY(1)) u_vga_dly (.clk, .rst_n, .din(dec_en), .dout(vga_en));

  delay_line #(.DELAY(2), .RESET_VAL(1'b1)) u_ps2_dly (
    .clk, .rst_n, .din(nor_db), .dout(nor_d2)
  );

  load_control #(.WIDTH(PS2_EN_CYCLES)) u_ps2_en (
    .clk, .rst_n, .din(nor_d2), .pulse(ps2_en)
  );

  // The register must be loaded before D2 clears the SR flip-flop.
  initial assert (D2_CYCLES > LOAD_CYCLES)
    else $error("D2_CYCLES must exceed LOAD_CYCLES");
endmodule
