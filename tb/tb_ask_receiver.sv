// tb_ask_receiver: drives the whole receiver chain with an on/off keyed
// 10.7 MHz tone (amplitude 4000 LSB at the ADC) following the 13-sub-bit sync
// pattern, 375 us per sub-bit, and checks:
//  - rx_bit at the middle of every sub-bit equals the keyed pattern;
//  - the lowpass level with the carrier on is near (2/pi)*(4000/2) = 1273
//    (envelope of the 50 kHz baseband) and near 0 with it off;
//  - the first rising edge of rx_bit comes 20..120 us after the carrier starts
//    (decimator block plus the filter's group delay).
module tb_ask_receiver;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [13:0] adc = '0;
  logic signed [17:0] thr = 18'sd600;
  logic signed [15:0] mix_out, dec_out;
  logic [15:0] env_out;
  logic dec_valid, lpf_valid, rx_bit;
  logic signed [17:0] lpf_out;
  int checks = 0, failures = 0;
  localparam int SUB = 9375;
  localparam logic [12:0] PATTERN = 13'b1011001011001;
  localparam real PI = 3.14159265358979;

  always #20 clk = ~clk;

  ask_receiver dut (.clk, .rst_n, .adc_data(adc), .threshold(thr), .mix_out, .dec_out, .dec_valid,
                    .env_out, .lpf_out, .lpf_valid, .rx_bit);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  logic carrier = 1'b0;
  real ph0;
  always @(negedge clk) begin
    cyc <= cyc + 1;
    adc <= carrier ? 14'($rtoi(4000.0 * $sin(2.0 * PI * 10.7e6 * cyc / 25.0e6 + ph0))) : 14'sd0;
  end

  int first_edge = -1, start_cyc = 0;
  always @(posedge clk) if (rst_n && rx_bit && first_edge < 0 && start_cyc > 0) first_edge = cyc - start_cyc;

  initial begin
    int bad = 0;
    real on_sum = 0, off_sum = 0;
    int on_n = 0, off_n = 0;
    ph0 = 1.234;
    repeat (4) @(negedge clk); rst_n = 1'b1;
    repeat (3 * SUB) @(negedge clk);                 // idle, carrier off
    checks++; if (rx_bit) begin failures++; $display("FAIL: bit high with no carrier"); end
    start_cyc = cyc;
    for (int s = 12; s >= 0; s--) begin
      carrier = PATTERN[s];
      for (int c = 0; c < SUB; c++) begin
        @(negedge clk);
        if (c == SUB / 2 + 1300) begin
          checks++;
          if (rx_bit != PATTERN[s]) begin failures++; bad++; $display("FAIL: sub-bit %0d got %0d", 12 - s, rx_bit); end
        end
        if (c > SUB / 2 && c < SUB - 100 && lpf_valid) begin
          if (PATTERN[s]) begin on_sum += real'(lpf_out); on_n++; end
          else begin off_sum += real'(lpf_out); off_n++; end
        end
      end
    end
    carrier = 1'b0;
    repeat (SUB) @(negedge clk);
    $display("carrier-on level %f, carrier-off level %f, first edge after %0d clocks",
             on_sum / on_n, off_sum / off_n, first_edge);
    checks++; if (on_sum / on_n < 1150 || on_sum / on_n > 1400) begin failures++; $display("FAIL: on level"); end
    checks++; if (off_sum / off_n > 50 || off_sum / off_n < -50) begin failures++; $display("FAIL: off level"); end
    checks++; if (first_edge < 500 || first_edge > 3000) begin failures++; $display("FAIL: edge delay"); end
    checks++; if (rx_bit) begin failures++; $display("FAIL: bit high after carrier end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
