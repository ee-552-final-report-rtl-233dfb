// debouncer: samples a switch line once every SAMPLE_CYCLES clocks.
//
// The debouncer is a D flip-flop that takes a new sample of its input only
// when a free-running counter wraps, once a millisecond (25,000 clocks of a
// 25 MHz clock), so switch bounce shorter than the sample period is never
// seen twice. This follows the original design; the two-flop synchroniser in front
// of the sampling flop and the reset value are this design's choice.
//
// Interface: din is the raw (asynchronous) line, dout the debounced level.
// Timing: dout follows a settled input within SAMPLE_CYCLES+2 clocks.
module debouncer #(
  parameter int unsigned SAMPLE_CYCLES = 25000,
  parameter bit          RESET_VAL     = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);
  localparam int unsigned CW = (SAMPLE_CYCLES > 1) ? $clog2(SAMPLE_CYCLES) : 1;
  logic [CW-1:0] cnt;
  logic [1:0]    sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sync <= {2{RESET_VAL}};
      dout <= RESET_VAL;
    end else begin
      sync <= {sync[0], din};
      if (cnt == CW'(SAMPLE_CYCLES - 1)) begin
        cnt  <= '0;
        dout <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
