// key_nor: the "all keys released" NOR gate of the data handling stage.
//
// Output is high while none of the five key-pressed lines is high, and goes
// low as soon as any key is pressed. The high level is the end-of-character
// condition that starts a load; the original design describes exactly this gate.
// Interface: pressed[4:0] (1 = key down), all_released. Purely combinational.
module key_nor (
  input  logic [4:0] pressed,
  output logic       all_released
);
  assign all_released = ~(|pressed);
endmodule
