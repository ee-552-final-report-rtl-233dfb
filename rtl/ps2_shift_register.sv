// ps2_shift_register: parallel-in, serial-out register for a PS/2 frame.
//
// load takes a data byte and builds the 11-bit frame: start bit 0, the
// eight data bits least significant first, the odd parity bit and stop bit
// 1, as the original design describes the packet. shift moves the next bit to the
// output and fills with 1, so the data line rests high once the frame is
// out. The register resets to all ones (line idle).
// Interface: load, din[7:0], shift, sout (current bit on the line).
module ps2_shift_register
  import bk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  byte_t din,
  input  logic  shift,
  output logic  sout
);
  logic [10:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '1;
    else if (load)  sr <= ps2_frame(din);
    else if (shift) sr <= {1'b1, sr[10:1]};
  end

  assign sout = sr[0];
endmodule
