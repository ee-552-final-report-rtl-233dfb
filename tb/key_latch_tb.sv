// key_latch_tb: random set/clear sequences against a reference model of
// the five-bit SR flip-flop (clear wins; set bits stay until clear).
module key_latch_tb;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [4:0] set = 0, q, model;
  int checks = 0, failures = 0;

  key_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // staggered chord: keys arrive and leave at different times
    @(negedge clk) set = 5'b10000;
    @(negedge clk) set = 5'b10100;
    @(negedge clk) set = 5'b00100;
    @(negedge clk) set = 5'b00001;
    @(negedge clk) set = 5'b00000;
    @(negedge clk);
    checks++;
    if (q !== 5'b10101) begin failures++; $display("FAIL: chord q=%b", q); end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (q !== 5'b00000) begin failures++; $display("FAIL: clear q=%b", q); end
    model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      set = 5'($urandom);
      if ($urandom_range(0, 3) != 0) set = 0;
      clr = ($urandom_range(0, 9) == 0);
      @(posedge clk);
      model = clr ? 5'b0 : (model | set);
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL: q=%b model=%b", q, model); end
    end
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
