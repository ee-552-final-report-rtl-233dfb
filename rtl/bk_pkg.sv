// bk_pkg: types and constants shared by the binary keyboard modules.
//
// A key code is the five finger switches read as a binary number, thumb as
// the most significant bit and little finger as the least significant bit;
// code 0 (no key pressed) is the "end of character" marker and carries no
// character. ASCII and PS/2 scan codes are bytes. The PS/2 break prefix F0
// is the protocol's own value; the other constants are this design's choice.
package bk_pkg;
  typedef logic [4:0] key_code_t;
  typedef logic [7:0] byte_t;

  localparam key_code_t KEY_NONE = 5'd0;
  localparam byte_t     PS2_BREAK = 8'hF0;
  localparam byte_t     ASCII_BKSP = 8'h08;
  localparam byte_t     ASCII_CR   = 8'h0D;
  localparam byte_t     ASCII_SPACE = 8'h20;

  // Odd parity bit of a PS/2 byte: makes the count of ones in data+parity odd.
  function automatic logic odd_parity(input byte_t d);
    return ~(^d);
  endfunction

  // 11-bit PS/2 frame, bit 0 sent first: start 0, data LSB first, parity, stop 1.
  function automatic logic [10:0] ps2_frame(input byte_t d);
    return {1'b1, odd_parity(d), d, 1'b0};
  endfunction
endpackage
