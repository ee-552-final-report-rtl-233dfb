// load_control: makes a load pulse of WIDTH clocks from a rising edge.
//
// As in the original design, one delay element, an AND gate and an XOR gate do the
// work: and_out = in AND delayed(in), pulse = in XOR and_out. When the
// input rises the delayed copy is still low, so the AND is low and the XOR
// high; once the edge has passed through the delay the AND goes high and
// the XOR low. While the input is low the XOR is low too. The pulse is thus
// high for the first WIDTH clocks of every high period of the input (or for
// the whole period if it is shorter).
//
// The delay element is this design's choice: a counter that counts the
// clocks the input has been high, saturating at WIDTH, whose "delayed"
// output is high once it has reached WIDTH. For a rising edge this is a
// WIDTH-clock delay; a falling edge passes at once, which the AND gate
// makes irrelevant. A counter keeps long pulses (thousands of clocks for
// the PS/2 enable) cheap, where a shift register would need one flip-flop
// per clock.
// Interface: din, pulse. pulse rises combinationally with din.
module load_control #(
  parameter int unsigned WIDTH = 25
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic pulse
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [CW-1:0] cnt;
  logic          delayed, and_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    cnt <= '0;
    else if (!din)                 cnt <= '0;
    else if (cnt != CW'(WIDTH))    cnt <= cnt + 1'b1;
  end

  assign delayed = (cnt == CW'(WIDTH));
  assign and_out = din & delayed;
  assign pulse   = din ^ and_out;
endmodule
