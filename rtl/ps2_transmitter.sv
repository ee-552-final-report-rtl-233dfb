// ps2_transmitter: the PS/2 keyboard output of the binary keyboard.
//
// Integrates the four PS/2 parts the original design lists: the binary-to-PS/2
// decoder looks up the make code of the register's five-bit code, the scan
// code generator turns each enable into make, F0, make, and the transmitter
// controller and shift register send every byte as an 11-bit frame on the
// device-driven PS/2 clock and data lines.
// Interface: code[4:0] from the key register, en (PS/2 enable); ps2_clk and
// ps2_data (idle high); busy while a key's three bytes are being sent;
// frame_done pulses once per byte sent.
// Timing: one byte takes 11 PS/2 clock periods plus the gap, i.e.
// (22 + GAP_HALVES) * HALF_CYCLES system clocks; a key takes three bytes.
module ps2_transmitter
  import bk_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = 1000,
  parameter int unsigned GAP_HALVES  = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  key_code_t code,
  input  logic      en,
  output logic      ps2_clk,
  output logic      ps2_data,
  output logic      busy,
  output logic      frame_done
);
  byte_t make, tx_byte;
  logic  make_valid, tx_valid, tx_ready, load, shift, gen_busy;

  ps2_make_decoder u_dec (.code, .make, .valid(make_valid));

  scan_code_gen u_gen (
    .clk, .rst_n, .en, .make, .make_valid,
    .tx_byte, .tx_valid, .tx_ready, .busy(gen_busy)
  );

  ps2_tx_controller #(.HALF_CYCLES(HALF_CYCLES), .GAP_HALVES(GAP_HALVES)) u_ctl (
    .clk, .rst_n, .tx_valid, .tx_ready,
    .load, .shift, .ps2_clk, .frame_done
  );

  ps2_shift_register u_sr (
    .clk, .rst_n, .load, .din(tx_byte), .shift, .sout(ps2_data)
  );

  assign busy = gen_busy || !tx_ready;
endmodule
