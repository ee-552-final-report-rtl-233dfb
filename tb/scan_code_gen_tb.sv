// scan_code_gen_tb: each enable edge with a valid make code must produce
// make, F0, make through the valid/ready handshake; input changes without
// an enable edge, and invalid codes, must produce nothing.
module scan_code_gen_tb;
  logic clk = 0, rst_n = 0, en = 0, make_valid = 0, tx_valid, tx_ready = 0, busy;
  logic [7:0] make = 0, tx_byte;
  byte unsigned got [$];
  int checks = 0, failures = 0;

  scan_code_gen dut (.*);

  always #5 clk = ~clk;

  // receiver accepts bytes at random moments
  always @(negedge clk) tx_ready = ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) got.push_back(tx_byte);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic press(input byte unsigned m, input bit v, input int hold);
    @(negedge clk) make = m; make_valid = v; en = 1;
    repeat (hold) @(negedge clk);
    en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      byte unsigned m;
      m = 8'($urandom_range(1, 8'h7F));
      got.delete();
      press(m, 1, $urandom_range(1, 5));
      // data changes after the edge must be ignored
      make = ~m;
      repeat (40) @(negedge clk);
      check(got.size() == 3, $sformatf("got %0d bytes", got.size()));
      if (got.size() == 3)
        check(got[0] == m && got[1] == 8'hF0 && got[2] == m,
              $sformatf("sequence %h %h %h for %h", got[0], got[1], got[2], m));
      check(!busy, "busy after sequence");
    end
    // invalid code: nothing sent
    got.delete();
    press(8'h00, 0, 3);
    repeat (20) @(negedge clk);
    check(got.size() == 0, "invalid code sent");
    // no enable edge: nothing sent
    make = 8'h1C; make_valid = 1;
    repeat (20) @(negedge clk);
    check(got.size() == 0, "sent without enable");
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
