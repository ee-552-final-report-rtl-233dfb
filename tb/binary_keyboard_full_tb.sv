// binary_keyboard_full_tb: end-to-end test of the binary keyboard with
// every parameter at its default (1 ms debounce at 25 MHz, 12.5 kHz PS/2
// clock). Types a letter, a multi-key punctuation chord, a backspace and a
// carriage return, and checks PS/2 bytes, the screen and every mechanism
// (see kb_tb_body.svh).
module binary_keyboard_full_tb;
  localparam int DB = 25000, HALF = 1000;
  logic clk = 0, reset_n = 0;
  logic thumb_n = 1, index_n = 1, middle_n = 1, ring_n = 1, little_n = 1;
  logic vga_red, vga_green, vga_blue, vga_h_sync, vga_v_sync, ps2_clk, ps2_data;

  binary_keyboard dut (.*);

  `include "kb_tb_body.svh"

  initial begin
    run_text({"K.", 8'h08, 8'h0D, "W"}, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
