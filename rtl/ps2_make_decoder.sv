// ps2_make_decoder: binary keyboard code to PS/2 make code.
//
// There is no formula for scan codes, so this is a look-up table from the
// five-bit code to the make code of the same key on a standard keyboard
// (scan code set 2): letters A..Z, space, backspace, '.', ',' and Enter for
// carriage return. The original design gives the principle and the value for A
// (1Ch); the other entries are the standard set-2 make codes. Code 0 has no
// key: valid is low and make is 00h. Purely combinational.
// Interface: code[4:0], make[7:0], valid.
module ps2_make_decoder
  import bk_pkg::*;
(
  input  key_code_t code,
  output byte_t     make,
  output logic      valid
);
  always_comb begin
    valid = 1'b1;
    unique case (code)
      5'd1:  make = 8'h1C; // A
      5'd2:  make = 8'h32; // B
      5'd3:  make = 8'h21; // C
      5'd4:  make = 8'h23; // D
      5'd5:  make = 8'h24; // E
      5'd6:  make = 8'h2B; // F
      5'd7:  make = 8'h34; // G
      5'd8:  make = 8'h33; // H
      5'd9:  make = 8'h43; // I
      5'd10: make = 8'h3B; // J
      5'd11: make = 8'h42; // K
      5'd12: make = 8'h4B; // L
      5'd13: make = 8'h3A; // M
      5'd14: make = 8'h31; // N
      5'd15: make = 8'h44; // O
      5'd16: make = 8'h4D; // P
      5'd17: make = 8'h15; // Q
      5'd18: make = 8'h2D; // R
      5'd19: make = 8'h1B; // S
      5'd20: make = 8'h2C; // T
      5'd21: make = 8'h3C; // U
      5'd22: make = 8'h2A; // V
      5'd23: make = 8'h1D; // W
      5'd24: make = 8'h22; // X
      5'd25: make = 8'h35; // Y
      5'd26: make = 8'h1A; // Z
      5'd27: make = 8'h29; // SPACE
      5'd28: make = 8'h66; // BACKSPACE
      5'd29: make = 8'h49; // .
      5'd30: make = 8'h41; // ,
      5'd31: make = 8'h5A; // ENTER (carriage return)
      default: begin make = 8'h00; valid = 1'b0; end
    endcase
  end
endmodule
