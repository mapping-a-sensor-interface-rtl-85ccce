// ask_frame_decoder: frame reader of the receiver node.
//
// While enabled and idle it watches the recovered bit stream for a rising
// edge, the start of the first sync sub-bit. It then restarts the sub-bit
// timer so that its ticks fall in the middle of each sub-bit (half a sub-bit
// after the edge, then every SUB_BIT_CYCLES) and shifts in 61 samples. The
// first 13 must equal the sync word, else sync_err pulses; each following group
// of six must be the code of a '0' or a '1', else code_err pulses. A good frame
// gives temp and a one-clock valid, and sets led when the temperature, read
// as a signed byte in degrees, is at least LED_THRESHOLD. After a frame the
// decoder waits for the next rising edge. Dropping enable abandons a frame.
// Edge scanning, the sync check and the LED decision follow the design description; mid-sub-bit sampling,
// the comparison and the threshold value are this design's choice.
module ask_frame_decoder #(
  parameter int                SUB_BIT_CYCLES = 9375,
  parameter logic signed [7:0] LED_THRESHOLD  = 8'sd25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        rx_bit,
  input  logic        sub_tick,
  output logic        timer_load,
  output logic [31:0] timer_load_value,
  output logic [31:0] timer_reload_value,
  output logic        busy,
  output logic [7:0]  temp,
  output logic        valid,
  output logic        sync_err,
  output logic        code_err,
  output logic        led
);
  import esp_pkg::*;

  logic                       bit_d;
  logic [FRAME_LEN-1:0]       sr;
  logic [$clog2(FRAME_LEN):0] cnt;
  logic [FRAME_LEN-1:0]       frame_c;
  logic [7:0]                 data_c;
  logic                       bad_code_c;

  assign timer_load_value   = 32'(SUB_BIT_CYCLES / 2 - 2);
  assign timer_reload_value = 32'(SUB_BIT_CYCLES - 1);
  assign timer_load         = enable && !busy && rx_bit && !bit_d;

  // Decode the frame including the sample arriving this clock.
  always_comb begin
    frame_c    = {sr[FRAME_LEN-2:0], rx_bit};
    data_c     = '0;
    bad_code_c = 1'b0;
    for (int b = 0; b < DATA_BITS; b++) begin
      logic [CODE_LEN-1:0] g;
      g = frame_c[CODE_LEN*(DATA_BITS-b)-1 -: CODE_LEN];
      data_c[DATA_BITS-1-b] = (g == CODE_ONE);
      if (g != CODE_ONE && g != CODE_ZERO) bad_code_c = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bit_d    <= 1'b0;
      sr       <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      temp     <= '0;
      valid    <= 1'b0;
      sync_err <= 1'b0;
      code_err <= 1'b0;
      led      <= 1'b0;
    end else begin
      bit_d    <= rx_bit;
      valid    <= 1'b0;
      sync_err <= 1'b0;
      code_err <= 1'b0;
      if (!enable) begin
        busy <= 1'b0;
        cnt  <= '0;
      end else if (!busy) begin
        cnt <= '0;
        if (timer_load) busy <= 1'b1;
      end else if (sub_tick) begin
        sr <= frame_c;
        if (cnt == ($clog2(FRAME_LEN)+1)'(FRAME_LEN - 1)) begin
          busy <= 1'b0;
          if (frame_c[FRAME_LEN-1 -: SYNC_LEN] != SYNC_WORD) sync_err <= 1'b1;
          else if (bad_code_c)                               code_err <= 1'b1;
          else begin
            temp  <= data_c;
            valid <= 1'b1;
            led   <= ($signed(data_c) >= LED_THRESHOLD);
          end
        end else
          cnt <= cnt + 1'b1;
      end
    end
endmodule
