// key_latch: five-bit SR flip-flop that collects the keys of one character.
//
// Each bit is set by its key-pressed line and stays set after the key is
// released, so keys that are pressed or released at different moments all
// end up in the code. The only reset is the delayed NOR output (delay D2),
// which clears all bits once the register has taken the code. This follows
// the original design; making it a clocked flip-flop rather than a gate latch, and
// reset taking priority over set, are this design's choices.
// Interface: set[4:0], clr (active high), q[4:0]. One clock from set to q.
module key_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] set,
  input  logic       clr,
  output logic [4:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= q | set;
  end
endmodule
