// rx_lowpass_fir: order-50 equiripple FIR lowpass of the ASK receiver.
//
// Smooths the envelope-detector output so that it shows only whether carrier
// energy is present. Direct form, fully parallel: on each in_valid the sample
// enters a 51-stage delay line and the symmetric pairs of taps are pre-added,
// multiplied by the 26 unique coefficients of esp_pkg::FIR_COEF and summed;
// the Q15 result is registered with out_valid one clock after in_valid.
// DC gain is 32733/32768. The order 50 and the equiripple response follow the
// design description; band edges, coefficient width and the architecture are
// this design's choice (see esp_pkg).
module rx_lowpass_fir #(
  parameter int IN_BITS  = 16,          // unsigned input
  parameter int OUT_BITS = 18           // signed output
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic        [IN_BITS-1:0]  in_data,
  input  logic                       in_valid,
  output logic signed [OUT_BITS-1:0] out_data,
  output logic                       out_valid
);
  import esp_pkg::*;

  localparam int ACC_BITS = IN_BITS + 2 + COEF_BITS + 6;

  logic [IN_BITS-1:0] line [FIR_TAPS-1];   // line[0] is the previous sample
  logic [IN_BITS-1:0] x    [FIR_TAPS];     // current window, x[0] newest
  logic signed [ACC_BITS-1:0] acc;

  always_comb begin
    x[0] = in_data;
    for (int k = 1; k < FIR_TAPS; k++) x[k] = line[k-1];
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < FIR_HALF - 1; k++)
      acc += $signed({2'b00, x[k]} + {2'b00, x[FIR_TAPS-1-k]}) * FIR_COEF[k];
    acc += $signed({2'b00, x[FIR_HALF-1]}) * FIR_COEF[FIR_HALF-1];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < FIR_TAPS - 1; k++) line[k] <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        line[0] <= in_data;
        for (int k = 1; k < FIR_TAPS - 1; k++) line[k] <= line[k-1];
        out_data <= OUT_BITS'(acc >>> COEF_FRAC);
      end
    end
endmodule
