// ps2_host_model: the receiving side of a PS/2 link, for testbenches.
//
// Samples the data line on every falling edge of the PS/2 clock, collects
// 11-bit frames (start 0, 8 data bits LSB first, odd parity, stop 1),
// checks their framing and parity and queues each received byte.
// frame_errors counts bad frames; byte_count counts good ones.
module ps2_host_model (
  input logic ps2_clk,
  input logic ps2_data
);
  byte unsigned rx [$];
  int frame_errors = 0;
  int byte_count = 0;
  logic [10:0] sh;
  int nbits = 0;

  always @(negedge ps2_clk) begin
    sh = {ps2_data, sh[10:1]};
    nbits++;
    if (nbits == 11) begin
      int ones;
      ones = 0;
      for (int i = 1; i <= 9; i++) ones += int'(sh[i]);
      if (sh[0] !== 1'b0 || sh[10] !== 1'b1 || (ones % 2) != 1) begin
        frame_errors++;
        $display("host: bad frame %b", sh);
      end else begin
        rx.push_back(sh[8:1]);
        byte_count++;
      end
      nbits = 0;
    end
  end
endmodule
