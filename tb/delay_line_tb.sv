// delay_line_tb: random input; output must equal the input DELAY clocks
// earlier, and the reset value before that.
module delay_line_tb;
  localparam int D = 7;
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic hist [$];
  int checks = 0, failures = 0;

  delay_line #(.DELAY(D), .RESET_VAL(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < D; i++) hist.push_back(1'b1);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      din = $urandom_range(0, 1);
      hist.push_back(din);
      @(posedge clk);
      #1;
      void'(hist.pop_front());
      checks++;
      if (dout !== hist[0]) begin failures++; $display("FAIL: cycle %0d dout=%b exp=%b", i, dout, hist[0]); end
      @(negedge clk);
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
