// title_rom_tb: reads every position of the title ROM and compares it
// with the title text; positions past its end must read as spaces.
module title_rom_tb;
  logic [6:0] addr;
  logic [7:0] data;
  int checks = 0, failures = 0;
  string title = "DATAD BINARY KEYBOARD";

  title_rom dut (.*);

  initial begin
    for (int i = 0; i < 128; i++) begin
      byte unsigned exp;
      addr = 7'(i);
      exp = (i < title.len()) ? title[i] : 8'h20;
      #1;
      checks++;
      if (data !== exp) begin failures++; $display("FAIL: pos %0d = %h exp %h", i, data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
