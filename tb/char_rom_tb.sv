// char_rom_tb: checks the character ROM's addressing and one-clock read
// latency on hand-picked rows of known glyphs (A, L, T, '.') and that the
// space and an unused code are blank.
module char_rom_tb;
  logic clk = 0;
  logic [9:0] addr = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  char_rom dut (.*);

  always #5 clk = ~clk;

  task automatic rd(input byte unsigned ch, input int row, input logic [7:0] exp);
    @(negedge clk) addr = {ch[6:0], 3'(row)};
    @(negedge clk);
    checks++;
    if (data !== exp) begin failures++; $display("FAIL: '%c' row %0d = %h exp %h", ch, row, data, exp); end
  endtask

  initial begin
    // 5x7 glyphs in columns 1..5: a full row is 7Ch, the middle pixel 10h
    rd("A", 0, 8'h38); rd("A", 3, 8'h7C); rd("A", 6, 8'h44); rd("A", 7, 8'h00);
    rd("L", 0, 8'h40); rd("L", 6, 8'h7C);
    rd("T", 0, 8'h7C); rd("T", 4, 8'h10);
    rd(".", 5, 8'h30); rd(".", 0, 8'h00);
    for (int r = 0; r < 8; r++) rd(" ", r, 8'h00);
    for (int r = 0; r < 8; r++) rd(8'h7F, r, 8'h00);
    // latency: data must not change in the same clock as the address
    @(negedge clk) addr = {7'h41, 3'd3};
    @(negedge clk) addr = {7'h20, 3'd3};
    #1 checks++;
    if (data !== 8'h7C) begin failures++; $display("FAIL: read is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
