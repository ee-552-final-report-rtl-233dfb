// ps2_tx_controller: PS/2 device-side clock generation and bit sequencing.
//
// The keyboard drives the PS/2 clock. Each of the 11 frame bits takes one
// clock period of 2*HALF_CYCLES system clocks: the bit is put on the data
// line while the clock is high, and the clock then goes low for a half
// period, the host sampling data on the falling edge. With a 25 MHz system
// clock and HALF_CYCLES = 1000 the clock toggles at 25 kHz, giving a
// 12.5 kHz PS/2 clock inside the protocol's 10-16.7 kHz range. After the
// stop bit the clock stays high for GAP_HALVES half periods before the
// next byte is accepted. The original design takes this part from an earlier PS/2
// mouse design and gives only its role; the timing numbers are this
// design's choice. Host-to-device transfers and host inhibit are not
// handled: the clock and data lines are outputs only.
// Interface: tx_valid in, tx_ready out (a byte is accepted on
// tx_valid && tx_ready: the shift register takes it while load is high); load/shift drive the shift register;
// ps2_clk is the PS/2 clock line; frame_done pulses after each stop bit.
module ps2_tx_controller
  import bk_pkg::*;
#(
  parameter int unsigned HALF_CYCLES = 1000,
  parameter int unsigned GAP_HALVES  = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_valid,
  output logic  tx_ready,
  output logic  load,
  output logic  shift,
  output logic  ps2_clk,
  output logic  frame_done
);
  typedef enum logic [1:0] {T_IDLE, T_HIGH, T_LOW, T_GAP} state_t;
  localparam int unsigned CW = $clog2(HALF_CYCLES * GAP_HALVES + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [3:0]    bitn;
  logic          half_done, gap_done;

  assign half_done = (cnt == CW'(HALF_CYCLES - 1));
  assign gap_done  = (cnt == CW'(HALF_CYCLES * GAP_HALVES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      cnt   <= '0;
      bitn  <= '0;
    end else begin
      unique case (state)
        T_IDLE: begin
          cnt  <= '0;
          bitn <= '0;
          if (tx_valid) state <= T_HIGH;
        end
        T_HIGH: begin
          if (half_done) begin cnt <= '0; state <= T_LOW; end
          else cnt <= cnt + 1'b1;
        end
        T_LOW: begin
          if (half_done) begin
            cnt <= '0;
            if (bitn == 4'd10) state <= T_GAP;
            else begin bitn <= bitn + 1'b1; state <= T_HIGH; end
          end else cnt <= cnt + 1'b1;
        end
        T_GAP: begin
          if (gap_done) begin cnt <= '0; state <= T_IDLE; end
          else cnt <= cnt + 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign tx_ready   = (state == T_IDLE);
  assign load       = tx_ready && tx_valid;
  assign shift      = (state == T_LOW) && half_done;
  assign frame_done = shift && (bitn == 4'd10);
  assign ps2_clk    = (state != T_LOW);
endmodule
