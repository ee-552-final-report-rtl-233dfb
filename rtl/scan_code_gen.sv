// scan_code_gen: sends make code, F0, make code for each enabled key.
//
// On the rising edge of en, if the make code is valid, the generator
// captures it and hands three bytes in turn to the transmitter controller:
// the make code, the break prefix F0h, and the make code again (a key press
// followed by its release). Between enables it ignores its input, as the
// original design requires; an enable that arrives while a sequence is still being
// sent is ignored too (this design's choice).
// Interface: en, make[7:0], make_valid in; tx_byte/tx_valid out, tx_ready
// in (a byte moves when tx_valid and tx_ready are both high); busy.
module scan_code_gen
  import bk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  byte_t make,
  input  logic  make_valid,
  output byte_t tx_byte,
  output logic  tx_valid,
  input  logic  tx_ready,
  output logic  busy
);
  typedef enum logic [1:0] {S_IDLE, S_MAKE, S_BREAK, S_REMAKE} state_t;
  state_t state;
  byte_t  held;
  logic   en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      held  <= '0;
      en_q  <= 1'b0;
    end else begin
      en_q <= en;
      unique case (state)
        S_IDLE:   if (en && !en_q && make_valid) begin
                    held  <= make;
                    state <= S_MAKE;
                  end
        S_MAKE:   if (tx_ready) state <= S_BREAK;
        S_BREAK:  if (tx_ready) state <= S_REMAKE;
        S_REMAKE: if (tx_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign tx_valid = (state != S_IDLE);
  assign tx_byte  = (state == S_BREAK) ? PS2_BREAK : held;
  assign busy     = tx_valid;
endmodule
