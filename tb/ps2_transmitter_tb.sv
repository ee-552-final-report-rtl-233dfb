// ps2_transmitter_tb: every key code through the whole PS/2 path, received
// by a host model: each non-zero code must arrive as make, F0, make with
// good framing and parity, and code 0 must send nothing.
module ps2_transmitter_tb;
  localparam int H = 5, G = 2;
  logic clk = 0, rst_n = 0, en = 0, ps2_clk, ps2_data, busy, frame_done;
  logic [4:0] code = 0;
  int checks = 0, failures = 0;
  byte unsigned exp [32] = '{8'h00,8'h1C,8'h32,8'h21,8'h23,8'h24,8'h2B,8'h34,
    8'h33,8'h43,8'h3B,8'h42,8'h4B,8'h3A,8'h31,8'h44,
    8'h4D,8'h15,8'h2D,8'h1B,8'h2C,8'h3C,8'h2A,8'h1D,
    8'h22,8'h35,8'h1A,8'h29,8'h66,8'h49,8'h41,8'h5A};

  ps2_transmitter #(.HALF_CYCLES(H), .GAP_HALVES(G)) dut (.*);
  ps2_host_model host (.ps2_clk, .ps2_data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      int t;
      t = 0;
      host.rx.delete();
      @(negedge clk) code = 5'(i); en = 1;
      repeat (3) @(negedge clk);
      en = 0;
      @(negedge clk);
      while (busy) begin @(negedge clk); t++; end
      if (i == 0) check(host.rx.size() == 0, "code 0 sent bytes");
      else begin
        check(host.rx.size() == 3, $sformatf("code %0d: %0d bytes", i, host.rx.size()));
        if (host.rx.size() == 3)
          check(host.rx[0] == exp[i] && host.rx[1] == 8'hF0 && host.rx[2] == exp[i],
                $sformatf("code %0d: %h %h %h", i, host.rx[0], host.rx[1], host.rx[2]));
        check(t + 5 >= 3 * (22 + G) * H && t <= 3 * (22 + G) * H + 5,
              $sformatf("code %0d took %0d clocks", i, t));
      end
    end
    check(host.frame_errors == 0, "framing or parity errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
