// data_register: the five-bit key code register of the data handling stage.
//
// Loads d on a clock edge while load is high (active-high load) and clears
// on the active-low global reset, as the original design specifies. It keeps the
// code after the SR latch has been cleared, so the decoder and the PS/2
// side can read it long after the keys were released.
// Interface: d[4:0], load, q[4:0]; q changes one clock after load.
module data_register (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  bk_pkg::key_code_t    d,
  output bk_pkg::key_code_t    q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end
endmodule
