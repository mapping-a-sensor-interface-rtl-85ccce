// rx_bit_decision: binary decision (threshold detector) of the ASK receiver.
//
// Each valid lowpass sample is compared with the threshold input: above it the
// received bit is '1' (carrier present), at or below it '0'. The bit is
// registered and held between samples, so it changes at most once per
// 500 kS/s sample, one clock after in_valid. The threshold comparison follows
// the design description; treating "equal" as '0' and using no hysteresis are
// this design's choices.
module rx_bit_decision #(
  parameter int DATA_BITS = 18
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [DATA_BITS-1:0] in_data,
  input  logic                        in_valid,
  input  logic signed [DATA_BITS-1:0] threshold,
  output logic                        bit_out
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        bit_out <= 1'b0;
    else if (in_valid) bit_out <= (in_data > threshold);
endmodule
