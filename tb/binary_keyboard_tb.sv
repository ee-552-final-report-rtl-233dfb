// binary_keyboard_tb: end-to-end test of the binary keyboard at reduced
// timing parameters (short debounce and PS/2 periods, same structure).
// Types a text covering every character class: letters, space, '.', ',',
// backspace and carriage return, and checks both outputs (see
// kb_tb_body.svh for what is checked).
module binary_keyboard_tb;
  localparam int DB = 40, HALF = 10;
  logic clk = 0, reset_n = 0;
  logic thumb_n = 1, index_n = 1, middle_n = 1, ring_n = 1, little_n = 1;
  logic vga_red, vga_green, vga_blue, vga_h_sync, vga_v_sync, ps2_clk, ps2_data;

  binary_keyboard #(.DEBOUNCE_CYCLES(DB), .LOAD_CYCLES(4), .D2_CYCLES(8),
                    .PS2_EN_CYCLES(3 * 2 * HALF), .PS2_HALF_CYCLES(HALF),
                    .PS2_GAP_HALVES(4)) dut (.*);

  `include "kb_tb_body.svh"

  initial begin
    run_text({"THE QUICK BROWN FOX JUMPS OVER", 8'h08, 8'h08, "ER A LAZY DOG.",
              8'h0D, "ZYX, WV", 8'h08, 8'h0D, "END"}, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
