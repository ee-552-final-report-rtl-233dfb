// delay_line: delays a one-bit signal by DELAY clocks (shift register).
//
// Used as delay D2, which holds back the NOR output on its way to the SR
// latch reset so the register is loaded before the latch clears, as the
// delay element of the load control, and for the short enable delays of
// the decoder and the VGA driver. The original design asks only for a delay; a
// chain of flip-flops is this design's choice.
// Interface: din, dout = din from DELAY clocks earlier (DELAY >= 1).
module delay_line #(
  parameter int unsigned DELAY     = 50,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);
  logic [DELAY:0] sr;

  assign sr[0] = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr[DELAY:1] <= {DELAY{RESET_VAL}};
    else        sr[DELAY:1] <= sr[DELAY-1:0];
  end

  assign dout = sr[DELAY];
endmodule
