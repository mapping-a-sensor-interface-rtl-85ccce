// ask_frame_encoder: ASK line coder of the sensor transmitter node.
//
// On send (while idle) it builds the 61-sub-bit frame for data: the 13-sub-bit
// sync word followed by the 8 data bits, most significant first, each coded as
// six sub-bits (see esp_pkg). It drives carrier_on, the DDS enable, with the
// first sub-bit at once and steps to the next sub-bit on every sub_tick from
// the sub-bit timer, which it restarts through timer_load so that ticks fall
// SUB_BIT_CYCLES apart starting from the send. After the 61st sub-bit the
// carrier goes off and done pulses. With the default 9375 clocks (375 us at
// 25 MHz) a frame lasts 22.875 ms. Timing, sync word and bit codes follow the
// design description; the bit order is this design's choice. A send while
// busy is ignored. cancel ends a frame at once with the carrier off (used when
// the node leaves the transmitter role).
module ask_frame_encoder #(
  parameter int SUB_BIT_CYCLES = 9375
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cancel,
  input  logic        send,
  input  logic [7:0]  data,
  input  logic        sub_tick,
  output logic        timer_load,
  output logic [31:0] timer_load_value,
  output logic [31:0] timer_reload_value,
  output logic        carrier_on,
  output logic        busy,
  output logic        done
);
  import esp_pkg::*;

  logic [FRAME_LEN-1:0]         frame;
  logic [$clog2(FRAME_LEN):0]   idx;

  // esp_timer: first tick load_value+2 clocks after the load, then every reload_value+1
  assign timer_load_value   = 32'(SUB_BIT_CYCLES - 2);
  assign timer_reload_value = 32'(SUB_BIT_CYCLES - 1);
  assign timer_load         = send && !busy && !cancel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      frame      <= '0;
      idx        <= '0;
      carrier_on <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cancel) begin
        busy       <= 1'b0;
        carrier_on <= 1'b0;
      end else if (!busy) begin
        if (send) begin
          frame      <= ask_frame(data) << 1;
          carrier_on <= ask_frame(data)[FRAME_LEN-1];
          idx        <= '0;
          busy       <= 1'b1;
        end
      end else if (sub_tick) begin
        if (idx == ($clog2(FRAME_LEN)+1)'(FRAME_LEN - 1)) begin
          busy       <= 1'b0;
          carrier_on <= 1'b0;
          done       <= 1'b1;
        end else begin
          idx        <= idx + 1'b1;
          carrier_on <= frame[FRAME_LEN-1];
          frame      <= frame << 1;
        end
      end
    end
endmodule
