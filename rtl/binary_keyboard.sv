// binary_keyboard: a five-switch chorded keyboard with VGA and PS/2 output.
//
// Each finger has one switch; a character is the binary number formed by
// the switches pressed together (thumb = MSB, little finger = LSB), and is
// taken when all switches are released again. The data handling stage
// (data_control) debounces the switches, collects the chord, stores it in
// a five-bit register and decodes it to ASCII. From there two outputs run
// side by side: char_display draws the title and the typed text on a VGA
// monitor, and ps2_transmitter sends the key's make code, F0 and make code
// as a PS/2 keyboard would.
//
// Interface: clk (25 MHz, one clock for everything), reset_n (active-low
// push button), the five switch inputs (active low: closed to ground,
// pulled up), five VGA lines and the PS/2 clock and data lines. The caps
// lock toggle switch is not connected, as in the original design's prototype.
// Timing: with the default parameters a chord is taken about 2 ms after
// its release, written to the screen a few clocks later, and sent over
// PS/2 in three 11-bit frames of about 0.9 ms each.
module binary_keyboard #(
  parameter int unsigned DEBOUNCE_CYCLES = 25000,
  parameter int unsigned LOAD_CYCLES     = 25,
  parameter int unsigned D2_CYCLES       = 50,
  parameter int unsigned PS2_EN_CYCLES   = 3000,
  parameter int unsigned PS2_HALF_CYCLES = 1000,
  parameter int unsigned PS2_GAP_HALVES  = 4
) (
  input  logic clk,
  input  logic reset_n,
  input  logic thumb_n,
  input  logic index_n,
  input  logic middle_n,
  input  logic ring_n,
  input  logic little_n,
  output logic vga_red,
  output logic vga_green,
  output logic vga_blue,
  output logic vga_h_sync,
  output logic vga_v_sync,
  output logic ps2_clk,
  output logic ps2_data
);
  import bk_pkg::*;

  key_code_t code;
  byte_t     ascii;
  logic      ascii_valid, vga_en, ps2_en, reg_load, latch_clr;
  logic      ps2_busy, ps2_frame_done, vga_wr;

  data_control #(
    .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES), .LOAD_CYCLES(LOAD_CYCLES),
    .D2_CYCLES(D2_CYCLES), .PS2_EN_CYCLES(PS2_EN_CYCLES)
  ) u_data (
    .clk, .rst_n(reset_n),
    .key_n({thumb_n, index_n, middle_n, ring_n, little_n}),
    .code, .ascii, .ascii_valid, .vga_en, .ps2_en, .reg_load, .latch_clr
  );

  char_display u_vga (
    .clk, .rst_n(reset_n), .en(vga_en && ascii_valid), .ascii,
    .vga_red, .vga_green, .vga_blue,
    .vga_hsync_n(vga_h_sync), .vga_vsync_n(vga_v_sync), .wr_event(vga_wr)
  );

  ps2_transmitter #(.HALF_CYCLES(PS2_HALF_CYCLES), .GAP_HALVES(PS2_GAP_HALVES)) u_ps2 (
    .clk, .rst_n(reset_n), .code, .en(ps2_en),
    .ps2_clk, .ps2_data, .busy(ps2_busy), .frame_done(ps2_frame_done)
  );
endmodule
