// title_rom: the title message shown above the typed characters.
//
// TITLE_LEN ASCII characters, addressed by position; the text is
// "DATAD BINARY KEYBOARD", the project's name, in the upper case the
// character ROM provides. The original design says a ROM holds the title message
// but does not print it; the text is this design's choice. Combinational
// read; positions past the end read as space.
module title_rom (
  input  logic [6:0] addr,
  output logic [7:0] data
);
  localparam int unsigned TITLE_LEN = 21;
  localparam logic [8*TITLE_LEN-1:0] TEXT = "DATAD BINARY KEYBOARD";

  always_comb begin
    if (addr < 7'(TITLE_LEN)) data = TEXT[8*(TITLE_LEN-1-int'(addr)) +: 8];
    else                      data = 8'h20;
  end
endmodule
