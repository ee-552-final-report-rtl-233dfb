// ps2_shift_register_tb: loads random bytes and checks the 11 bits shifted
// out against a frame built here (start, data LSB first, odd parity, stop),
// and that the line rests high afterwards.
module ps2_shift_register_tb;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, sout;
  logic [7:0] din = 0;
  int checks = 0, failures = 0;

  ps2_shift_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (sout !== 1'b1) begin failures++; $display("FAIL: idle level"); end
    rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      logic [10:0] f;
      int ones;
      logic [7:0] b;
      ones = 0;
      b = 8'($urandom);
      for (int i = 0; i < 8; i++) ones += int'(b[i]);
      f[0] = 0;
      f[8:1] = b;
      f[9] = (ones % 2 == 0);
      f[10] = 1;
      @(negedge clk) din = b; load = 1;
      @(negedge clk) load = 0;
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (sout !== f[i]) begin failures++; $display("FAIL: byte %h bit %0d", b, i); end
        repeat ($urandom_range(0, 2)) @(negedge clk);
        shift = 1;
        @(negedge clk) shift = 0;
      end
      checks++;
      if (sout !== 1'b1) begin failures++; $display("FAIL: line not high after frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
