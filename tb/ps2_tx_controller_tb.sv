// ps2_tx_controller_tb: checks the PS/2 clock the controller makes (11
// low phases of HALF clocks per byte, a high phase of HALF clocks before
// each), the shift strobes at each rising clock edge, the gap before the
// next byte is accepted, and frame_done once per byte.
module ps2_tx_controller_tb;
  localparam int H = 6, G = 3;
  logic clk = 0, rst_n = 0, tx_valid = 0, tx_ready, load, shift, ps2_clk, frame_done;
  logic [7:0] tx_byte = 0;
  int checks = 0, failures = 0;
  int lows = 0, shifts = 0, dones = 0, lowlen = 0, highlen = 0;

  ps2_tx_controller #(.HALF_CYCLES(H), .GAP_HALVES(G)) dut (
    .clk, .rst_n, .tx_valid, .tx_ready, .load, .shift, .ps2_clk, .frame_done
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic prev_clk = 1;
  always @(posedge clk) if (rst_n) begin
    if (shift) shifts++;
    if (frame_done) dones++;
    if (!ps2_clk) lowlen++;
    else highlen++;
    if (prev_clk && !ps2_clk) begin
      lows++;
      check(highlen == H || highlen >= H * G, $sformatf("high phase %0d", highlen));
      highlen = 0;
    end
    if (!prev_clk && ps2_clk) begin
      check(lowlen == H, $sformatf("low phase %0d", lowlen));
      lowlen = 0;
    end
    prev_clk = ps2_clk;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (H * G) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      int t;
      t = 0;
      @(negedge clk) tx_byte = 8'(k * 37 + 5); tx_valid = 1;
      #1;
      check(tx_ready && load, "byte not accepted when idle");
      @(negedge clk) tx_valid = 0;
      while (!tx_ready) begin @(negedge clk); t++; end
      check(t == (22 + G) * H, $sformatf("byte time %0d exp %0d", t, (22 + G) * H));
    end
    check(lows == 44, $sformatf("%0d clock pulses", lows));
    check(shifts == 44, $sformatf("%0d shifts", shifts));
    check(dones == 4, $sformatf("%0d frame_done", dones));
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
