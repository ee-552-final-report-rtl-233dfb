// ascii_decoder: five-bit binary alphabet code to eight-bit ASCII.
//
// The table is the original design's binary alphabet: codes 1..26 are the upper
// case letters A..Z (ASCII 41h..5Ah, i.e. 40h + code), 27 is SPACE (20h),
// 28 backspace (08h), 29 '.' (2Eh), 30 ',' (2Ch) and 31 carriage return
// (0Dh). Code 0 is "no character" and decodes to 00h. The output is
// registered and changes only on a clock with en high, so it is not
// cleared when the enable goes low but refreshed when new data arrives,
// as the original design asks. valid tells whether the held byte is a character.
// Interface: code[4:0], en, ascii[7:0], valid. One clock from en to ascii.
module ascii_decoder
  import bk_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  key_code_t code,
  output byte_t     ascii,
  output logic      valid
);
  byte_t next;

  always_comb begin
    unique case (code)
      5'd0:    next = 8'h00;
      5'd27:   next = ASCII_SPACE;
      5'd28:   next = ASCII_BKSP;
      5'd29:   next = 8'h2E;
      5'd30:   next = 8'h2C;
      5'd31:   next = ASCII_CR;
      default: next = 8'h40 + {3'b000, code};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ascii <= 8'h00;
      valid <= 1'b0;
    end else if (en) begin
      ascii <= next;
      valid <= (code != KEY_NONE);
    end
  end
endmodule
