// data_register_tb: load, hold and active-low reset of the code register.
module data_register_tb;
  logic clk = 0, rst_n = 0, load = 0;
  logic [4:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;

  data_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d = 5'($urandom);
      load = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("FAIL: q=%h exp=%h", q, model); end
    end
    @(negedge clk) rst_n = 0;
    #1 checks++;
    if (q !== 0) begin failures++; $display("FAIL: async reset"); end
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
