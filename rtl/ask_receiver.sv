// ask_receiver: non-coherent ASK receiver for the 10.7 MHz IF.
//
// The five stages run in the order of the receiver block diagram:
// downconversion of the IF to 50 kHz (rx_downconverter), decimation by 50 to
// 500 kS/s (rx_decimator), absolute-value envelope detection (rx_envelope),
// the order-50 lowpass (rx_lowpass_fir) and the threshold decision
// (rx_bit_decision). rx_bit is the recovered carrier-on/off stream, one
// decision per 500 kS/s sample. Intermediate signals are brought out for
// observation. Latency from ADC input to rx_bit is 4 clocks plus the
// decimator's block of 50 and the lowpass's 25-sample group delay (about
// 52 us in all at the default rates).
module ask_receiver #(
  parameter int          ADC_BITS   = 14,
  parameter int          DECIMATION = 50,
  parameter int unsigned LO_FTW     = 32'd1829656068
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [ADC_BITS-1:0] adc_data,
  input  logic signed [17:0]         threshold,
  output logic signed [15:0]         mix_out,
  output logic signed [15:0]         dec_out,
  output logic                       dec_valid,
  output logic        [15:0]         env_out,
  output logic signed [17:0]         lpf_out,
  output logic                       lpf_valid,
  output logic                       rx_bit
);
  logic env_valid;

  rx_downconverter #(.IN_BITS(ADC_BITS), .OUT_BITS(16), .LO_FTW(LO_FTW)) u_mix (
    .clk, .rst_n, .adc_data, .mix_out);

  rx_decimator #(.DATA_BITS(16), .DECIMATION(DECIMATION)) u_dec (
    .clk, .rst_n, .in_data(mix_out), .out_data(dec_out), .out_valid(dec_valid));

  rx_envelope #(.DATA_BITS(16)) u_env (
    .clk, .rst_n, .in_data(dec_out), .in_valid(dec_valid), .out_data(env_out), .out_valid(env_valid));

  rx_lowpass_fir #(.IN_BITS(16), .OUT_BITS(18)) u_lpf (
    .clk, .rst_n, .in_data(env_out), .in_valid(env_valid), .out_data(lpf_out), .out_valid(lpf_valid));

  rx_bit_decision #(.DATA_BITS(18)) u_dec_bit (
    .clk, .rst_n, .in_data(lpf_out), .in_valid(lpf_valid), .threshold(threshold), .bit_out(rx_bit));
endmodule
