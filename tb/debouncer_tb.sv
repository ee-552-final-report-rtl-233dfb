// debouncer_tb: checks that the debouncer takes a new sample only once per
// sample period, ignores bounce shorter than the period, and follows a
// settled input within SAMPLE_CYCLES+2 clocks.
module debouncer_tb;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, din = 1, dout;
  int checks = 0, failures = 0;
  int changes_seen = 0;

  debouncer #(.SAMPLE_CYCLES(N), .RESET_VAL(1'b1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // dout may change at most once in any N consecutive clocks
  logic last;
  int   since_change = 1000;
  always @(posedge clk) if (rst_n) begin
    if (dout !== last) begin
      check(since_change >= N - 1, "two output changes closer than one sample period");
      since_change = 0;
      changes_seen++;
    end else since_change++;
    last = dout;
  end

  task automatic settle_and_check(input bit v);
    int lat;
    lat = 0;
    din = v;
    while (dout !== v && lat < 3 * N) begin @(posedge clk); lat++; end
    check(dout === v, $sformatf("output did not follow settled input %0b", v));
    check(lat <= N + 2, $sformatf("latency %0d above %0d", lat, N + 2));
  endtask

  initial begin
    last = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(dout === 1'b1, "reset value");
    repeat (2 * N) @(posedge clk);
    check(dout === 1'b1, "idle stays high");
    // bounce then settle low
    for (int i = 0; i < 6; i++) begin din = i[0]; @(posedge clk); end
    settle_and_check(1'b0);
    repeat (3 * N) @(posedge clk);
    check(dout === 1'b0, "stays low");
    for (int i = 0; i < 5; i++) begin din = ~i[0]; @(posedge clk); end
    settle_and_check(1'b1);
    // random bounce episodes
    for (int k = 0; k < 20; k++) begin
      bit target;
      target = 1'($urandom_range(0, 1));
      repeat ($urandom_range(0, 8)) begin din = $urandom_range(0, 1); @(posedge clk); end
      settle_and_check(target);
      repeat (N) @(posedge clk);
    end
    check(changes_seen >= 2, "output changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
