// load_control_tb: the pulse must be high for exactly the first WIDTH
// clocks of each high period of the input (or all of a shorter one).
module load_control_tb;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, din = 0, pulse;
  int checks = 0, failures = 0, run = 0, pulses = 0;

  load_control #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input bit v);
    @(negedge clk);
    din = v;
    #1;
    checks++;
    if (pulse !== (din && run < W)) begin
      failures++;
      $display("FAIL: din=%b run=%0d pulse=%b", din, run, pulse);
    end
    if (pulse && din && run == 0) pulses++;
    @(posedge clk);
    run = din ? run + 1 : 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a long high period: pulse of exactly W clocks
    repeat (3) step(0);
    repeat (3 * W) step(1);
    repeat (2 * W + 1) step(0);
    // a short high period
    repeat (2) step(1);
    repeat (W + 2) step(0);
    // random periods
    for (int k = 0; k < 60; k++) begin
      int hi, lo;
      hi = $urandom_range(1, 3 * W);
      lo = $urandom_range(W + 1, 3 * W);
      repeat (hi) step(1);
      repeat (lo) step(0);
    end
    checks++;
    if (pulses < 60) begin failures++; $display("FAIL: only %0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
